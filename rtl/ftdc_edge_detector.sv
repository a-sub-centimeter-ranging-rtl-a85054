// ftdc_edge_detector: fine TDC phase-edge detector (PED). Converts the 16 ILO phases, sampled by
// STOP, into the 4-bit fine code.
//
// Phases: filo[k] is the 1.2 GHz ILO clock delayed by k/16 of a period (52 ps steps), with
// filo[k+8] the complement of filo[k]. Sampled at a time p*52 ps after filo[0] rises, the vector
// holds ones at indices p-7..p (mod 16) and zeros elsewhere, so the single high-to-low step when
// the vector is read as a ring from index p to p+1 gives the fine code p.
//
// Structure, following the sensor: eight sense amplifiers, each comparing the differential pair
// filo[i] / filo[i+8] on the rising STOP edge and holding the result (SA plus SR latch), give
// sa[i] and its complement sa[i+8]. Here each SA is one flop sampling filo[i]; the complement
// output of the pair is its inverse. A bubble filter then cleans the ring, an XOR edge detector
// marks the high-to-low step and a 16-to-4 priority encoder turns the one-hot mark into binary.
// The bubble filter is a 5-input majority around each bit, which removes bubbles up to two bits
// wide and leaves a clean 8-high/8-low ring unchanged; the exact filter is this design's choice.
// When no edge survives the filter, fine = 0 and edge_ok = 0.
//
// Timing: fine and edge_ok are combinational from the SA flops, valid right after the STOP edge
// and held until the next one.
`timescale 1ps/1fs
module ftdc_edge_detector
  import lidar_pkg::*;
#(
  parameter int unsigned NPH = N_PHASE
) (
  input  logic                     stop,     // sampling edge (rising)
  input  logic [NPH-1:0]           filo,     // ILO phases
  output logic [$clog2(NPH)-1:0]   fine,     // fine code
  output logic                     edge_ok,  // an edge was found
  output logic [NPH-1:0]           sa_q      // sense-amplifier outputs (observability)
);

  localparam int unsigned HALF = NPH / 2;

  logic [HALF-1:0] sa_p;   // one flop per differential SA

  always_ff @(posedge stop) sa_p <= filo[HALF-1:0];

  assign sa_q = {~sa_p, sa_p};

  logic [NPH-1:0] flt;     // bubble-filtered ring
  logic [NPH-1:0] edge_h;  // one-hot high-to-low marker

  always_comb begin
    for (int j = 0; j < int'(NPH); j++) begin
      int unsigned ones;
      ones = 0;
      for (int d = -2; d <= 2; d++) ones += int'(sa_q[(j + d + int'(NPH)) % int'(NPH)]);
      flt[j] = (ones >= 3);
    end
    for (int j = 0; j < int'(NPH); j++)
      edge_h[j] = flt[j] & (flt[j] ^ flt[(j + 1) % int'(NPH)]);
  end

  always_comb begin
    fine    = '0;
    edge_ok = 1'b0;
    for (int j = 0; j < int'(NPH); j++)
      if (edge_h[j]) begin
        fine    = j[$clog2(NPH)-1:0];
        edge_ok = 1'b1;
      end
  end

endmodule
