// tb_fg_adder_bidir: self-checking test of the two-mode Fredkin-gate adder.
//
// Forward, ancillas at 0 and 1: all eight p,q,r are added and compared with
// {carry, sum} = p + q + r, p and q unchanged and g = ~p&~q | ~q&r | ~p&r;
// the left-end outputs must stay zero. Back: the eight output words worked out
// here the same way are placed on the right end and must roll back to the
// p,q,r that produce them with 0 and 1 on the ancilla lines; the right-end
// outputs must stay zero. The worked case of rolling back sum = 1, carry = 1 to
// p = q = r = 1 is checked on its own. Over all 32 five-bit left words the
// forward map must be one-to-one and back mode must undo it. One step per
// clock cycle; mode switches are counted and must happen. A watchdog fails the
// run after 2000 cycles.
module tb_fg_adder_bidir;
  import fredkin_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int mode_switches = 0;

  fg_mode_e     mode;
  adder_left_t  left_i, left_o;
  adder_right_t right_i, right_o;

  fg_adder_bidir dut (.mode, .left_i, .left_o, .right_i, .right_o);

  always @(mode) mode_switches++;

  task automatic check(input string what, input logic [4:0] got, input logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Expected adder outputs {p, q, sum, carry, g} for operands p, q, r.
  function automatic adder_right_t add_ref(input logic [2:0] pqr);
    logic [1:0] total;
    logic pp, qq, rr;
    {pp, qq, rr} = pqr;
    total = 2'(pp) + 2'(qq) + 2'(rr);
    return '{p: pp, q: qq, sum: total[0], carry: total[1],
             g: (~pp & ~qq) | (~qq & rr) | (~pp & rr)};
  endfunction

  task automatic go_forward(input adder_left_t w);
    @(negedge clk);
    mode = MODE_FORWARD;
    left_i = w;
    right_i = 5'($urandom);
    @(posedge clk);
  endtask

  task automatic go_back(input adder_right_t w);
    @(negedge clk);
    mode = MODE_BACK;
    right_i = w;
    left_i = 5'($urandom);
    @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [31:0] seen;
    adder_right_t fw;
    mode = MODE_FORWARD;
    left_i = '0;
    right_i = '0;
    for (int i = 0; i < 8; i++) begin
      go_forward('{p: i[2], q: i[1], r: i[0], anc0: 1'b0, anc1: 1'b1});
      check($sformatf("forward add %b", 3'(i)), right_o, add_ref(3'(i)));
      check("forward idle left end", left_o, 5'b0);
    end
    for (int i = 0; i < 8; i++) begin
      go_back(add_ref(3'(i)));
      check($sformatf("back roll of %b", add_ref(3'(i))), left_o,
            {i[2], i[1], i[0], 1'b0, 1'b1});
      check("back idle right end", right_o, 5'b0);
    end
    go_back('{p: 1'b1, q: 1'b1, sum: 1'b1, carry: 1'b1, g: 1'b0});
    check("sum=1 carry=1 rolls back to p=q=r=1", left_o, 5'b111_01);
    seen = '0;
    for (int i = 0; i < 32; i++) begin
      go_forward(5'(i));
      fw = right_o;
      checks++;
      if (seen[fw]) begin
        failures++;
        $display("FAIL forward word %b repeated", fw);
      end
      seen[fw] = 1'b1;
      go_back(fw);
      check($sformatf("round trip of %b", 5'(i)), left_o, 5'(i));
    end
    checks++;
    if (mode_switches < 2) begin
      failures++;
      $display("FAIL mode never switched");
    end
    $display("mode switches: %0d", mode_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
