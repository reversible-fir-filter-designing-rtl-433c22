// fredkin_delay: W-bit z^-1 delay element of the FIR delay line.
//
// Each bit is a storage cell wrapped in two Fredkin gates. The first gate
// takes (enable, data, stored value): its R output is data when enable is 1
// and the stored value when enable is 0, so it decides between loading and
// holding. The second gate takes (stored value, 0, 1) and acts as a copy
// gate, since fan-out is not allowed in reversible logic: its Q output
// (t1) is the stored value and its R output (t2) is its complement.
//
// The gate arrangement (enable and data into the first gate, feedback from
// the output copy, a constant-input copy gate) follows the Fredkin-gate
// latch that the filter's delay elements are based on. Making the storage an edge-triggered flip-flop rather than a
// level-sensitive latch is this design's choice: it gives a clean
// one-sample delay in a synchronous pipeline. Reset is asynchronous, active
// low, and clears the stored value.
//
// Timing: when en is 1 at a rising clk edge, d appears on t1 after that edge.
module fredkin_delay #(
  parameter int unsigned W = rev_fir_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low
  input  logic         en,     // load enable (sample strobe)
  input  logic [W-1:0] d,
  output logic [W-1:0] t1,     // delayed sample
  output logic [W-1:0] t2      // its complement
);
  logic [W-1:0] state, next;

  for (genvar i = 0; i < W; i++) begin : g_bit
    // load/hold select: r = en ? d : state
    fredkin_gate u_sel  (.a(en), .b(d[i]), .c(state[i]),
                         .p(), .q(), .r(next[i]));
    // output copy gate: q = state, r = ~state
    fredkin_gate u_copy (.a(state[i]), .b(1'b0), .c(1'b1),
                         .p(), .q(t1[i]), .r(t2[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= '0;
    else        state <= next;
  end
endmodule
