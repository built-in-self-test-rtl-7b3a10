// Alternation checker: watches phi(t) during the test and reports any break
// in its 0,1,0,1,... pattern.
//
// A toggle register holds the expected value t mod 2 (0 at the first step,
// inverted after every checked step). In step t, err = valid & (phi !=
// expected). The first such step is exactly the first step at which phi
// equals its predecessor, so the first alarm comes at the same step as a
// compare-with-previous checker; later steps are judged against the
// fault-free phase, so each flagged step is one where phi itself was wrong,
// which is what fault diagnosis wants. The scheme fixes only the function
// (flag any break in the alternation); the phase-register form and the
// diagnosis outputs are this design's choices.
//
// Outputs: err (combinational, this step deviates), fail (sticky, set at
// the clock edge after the first deviation), first_t (step index of the
// first deviation, valid when fail), dev_count (number of deviating steps,
// saturating). `clear` restarts the phase at 0 and clears the records;
// `valid` marks a step to be checked and advances the phase. Step indices
// are counted internally, TW bits wide. Asynchronous active-low reset acts
// like clear.
module alt_checker #(
  parameter int unsigned TW = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          valid,
  input  logic          phi,
  output logic          err,
  output logic          fail,
  output logic [TW-1:0] first_t,
  output logic [TW-1:0] dev_count
);

  logic          expected;
  logic [TW-1:0] t;

  assign err = valid && (phi != expected);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      expected  <= 1'b0;
      t         <= '0;
      fail      <= 1'b0;
      first_t   <= '0;
      dev_count <= '0;
    end else if (clear) begin
      expected  <= 1'b0;
      t         <= '0;
      fail      <= 1'b0;
      first_t   <= '0;
      dev_count <= '0;
    end else if (valid) begin
      expected <= ~expected;
      t        <= t + 1'b1;
      if (err) begin
        fail <= 1'b1;
        if (!fail) first_t <= t;
        if (dev_count != '1) dev_count <= dev_count + 1'b1;
      end
    end
  end

endmodule
