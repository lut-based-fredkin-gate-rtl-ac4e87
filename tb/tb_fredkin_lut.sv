// tb_fredkin_lut: self-checking test of the forward-only Fredkin gate.
//
// Applies all eight input combinations of C,B,A, one per clock cycle, and
// compares F1,F2,F3 with the published truth table of the Fredkin gate,
// written out here as constants. It also checks the two properties the table
// is meant to have: each output word has as many ones as its input word, and
// the eight output words are all different (the gate is a permutation). The
// eight input cases of the published transistor-level simulation are
// replayed with their reported outputs, and the gate is used as AND (B = 0,
// output F2), OR (B = 1, output F3) and NOT (B = 1, A = 0, output F2) on all
// operand values. A watchdog ends the run as failed
// after 1000 cycles.
module tb_fredkin_lut;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic c, b, a;
  logic f1, f2, f3;

  fredkin_lut dut (.c, .b, .a, .f1, .f2, .f3);

  // Truth table, indexed by {C,B,A}, value {F1,F2,F3}.
  localparam logic [2:0] TABLE [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111
  };

  // Transistor-level simulation cases a..h: {C,B,A} and reported {F1,F2,F3}.
  localparam logic [2:0] SIM_IN  [8] = '{3'b110, 3'b010, 3'b011, 3'b010,
                                         3'b000, 3'b100, 3'b101, 3'b111};
  localparam logic [2:0] SIM_OUT [8] = '{3'b101, 3'b010, 3'b011, 3'b010,
                                         3'b000, 3'b100, 3'b110, 3'b111};

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
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

  initial begin : stim
    logic [7:0] seen;
    seen = '0;
    {c, b, a} = 3'b000;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      {c, b, a} = 3'(i);
      @(posedge clk);
      check($sformatf("table row %0d", i), {f1, f2, f3}, TABLE[i]);
      checks++;
      if ($countones({f1, f2, f3}) != $countones(3'(i))) begin
        failures++;
        $display("FAIL row %0d: number of ones not kept", i);
      end
      checks++;
      if (seen[{f1, f2, f3}]) begin
        failures++;
        $display("FAIL row %0d: output %b repeated", i, {f1, f2, f3});
      end
      seen[{f1, f2, f3}] = 1'b1;
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      {c, b, a} = SIM_IN[i];
      @(posedge clk);
      check($sformatf("simulation case %0d", i), {f1, f2, f3}, SIM_OUT[i]);
    end
    // The gate as a universal element: B = 0 gives AND on F2, B = 1 gives OR
    // on F3, and B = 1, A = 0 gives NOT on F2.
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      {c, b, a} = {i[1], 1'b0, i[0]};
      @(posedge clk);
      check($sformatf("AND %b", 2'(i)), {2'b00, f2}, {2'b00, i[1] & i[0]});
      @(negedge clk);
      {c, b, a} = {i[1], 1'b1, i[0]};
      @(posedge clk);
      check($sformatf("OR %b", 2'(i)), {2'b00, f3}, {2'b00, i[1] | i[0]});
    end
    for (int i = 0; i < 2; i++) begin
      @(negedge clk);
      {c, b, a} = {i[0], 1'b1, 1'b0};
      @(posedge clk);
      check($sformatf("NOT %b", 1'(i)), {2'b00, f2}, {2'b00, ~i[0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
