// tb_fredkin_lut_bidir: self-checking test of the two-mode Fredkin gate.
//
// Forward mode: all eight C,B,A words are applied on the left and F1,F2,F3 on
// the right are compared with the Fredkin truth table held here as constants;
// the left outputs must stay at zero. Back mode: all eight F1,F2,F3 words are
// applied on the right and the left outputs must be the C,B,A word whose table
// entry is that F word (found by searching the table); the right outputs must
// stay at zero. Then 200 random round trips: a random word goes forward, the
// result is fed back, and the original word must come out. One step per clock
// cycle; a watchdog fails the run after 2000 cycles.
module tb_fredkin_lut_bidir;
  import fredkin_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  fg_mode_e mode;
  fg_side_t left_i, left_o, right_i, right_o;

  fredkin_lut_bidir dut (.mode, .left_i, .left_o, .right_i, .right_o);

  localparam logic [2:0] TABLE [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111
  };

  function automatic logic [2:0] table_inverse(input logic [2:0] f);
    for (int i = 0; i < 8; i++)
      if (TABLE[i] == f) return 3'(i);
    return 3'b000;
  endfunction

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [2:0] w, fw;
    mode = MODE_FORWARD;
    left_i = '0;
    right_i = '0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      mode = MODE_FORWARD;
      left_i = 3'(i);
      right_i = 3'($urandom);   // ignored in forward mode
      @(posedge clk);
      check($sformatf("forward %0d", i), right_o, TABLE[i]);
      check($sformatf("forward %0d idle left", i), left_o, 3'b000);
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      mode = MODE_BACK;
      right_i = 3'(i);
      left_i = 3'($urandom);    // ignored in back mode
      @(posedge clk);
      check($sformatf("back %0d", i), left_o, table_inverse(3'(i)));
      check($sformatf("back %0d idle right", i), right_o, 3'b000);
    end
    for (int n = 0; n < 200; n++) begin
      w = 3'($urandom);
      @(negedge clk);
      mode = MODE_FORWARD;
      left_i = w;
      @(posedge clk);
      fw = right_o;
      check("round trip forward", fw, TABLE[w]);
      @(negedge clk);
      mode = MODE_BACK;
      right_i = fw;
      @(posedge clk);
      check("round trip back", left_o, w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
