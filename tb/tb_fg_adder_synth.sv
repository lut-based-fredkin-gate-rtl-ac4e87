// tb_fg_adder_synth: self-checking test of the synthesized five-gate reversible full adder (fg_adder_synth).
//
// All eight combinations of p, q, r are applied, one per clock cycle, and the
// outputs are compared with values computed here independently: {carry, sum}
// as the integer sum p + q + r, p and q passed through unchanged, and the
// garbage bit g = ~p&~q | ~q&r | ~p&r (the function the gate-by-gate analysis
// gives for the last gate's F3). Because a reversible circuit may not lose
// information, the eight five-bit output words must also all differ. The
// random order of a second pass checks that no state is kept between inputs.
// A watchdog fails the run after 1000 cycles.
module tb_fg_adder_synth;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic p, q, r;
  logic p_o, q_o, sum, carry, g;

  fg_adder_synth dut (.p, .q, .r, .p_o, .q_o, .sum, .carry, .g);

  task automatic check(input string what, input logic [4:0] got, input logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [2:0] pqr, input string tag);
    logic [1:0] total;
    logic       exp_g;
    @(negedge clk);
    {p, q, r} = pqr;
    @(posedge clk);
    total = 2'(pqr[2]) + 2'(pqr[1]) + 2'(pqr[0]);
    exp_g = (~pqr[2] & ~pqr[1]) | (~pqr[1] & pqr[0]) | (~pqr[2] & pqr[0]);
    check($sformatf("%s p,q,r=%b {p,q,sum,carry,g}", tag, pqr),
          {p_o, q_o, sum, carry, g},
          {pqr[2], pqr[1], total[0], total[1], exp_g});
  endtask

  initial begin : stim
    logic [31:0] seen;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      apply(3'(i), "sweep");
      checks++;
      if (seen[{p_o, q_o, sum, carry, g}]) begin
        failures++;
        $display("FAIL output word %b repeated", {p_o, q_o, sum, carry, g});
      end
      seen[{p_o, q_o, sum, carry, g}] = 1'b1;
    end
    for (int n = 0; n < 64; n++) apply(3'($urandom), "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
