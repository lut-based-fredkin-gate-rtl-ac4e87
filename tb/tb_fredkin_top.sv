// tb_fredkin_top: end-to-end test of the whole design (fredkin_top).
//
// Each clock cycle a random operation is applied to every circuit in the top:
//   - the single gate gets a random C,B,A and is compared with the Fredkin
//     truth table held here; cycles with C = 1 count as swaps, C = 0 as passes;
//   - both five-gate adders get the same random p, q, r and are compared with
//     {carry, sum} = p + q + r, p and q unchanged and the garbage bit
//     g = ~p&~q | ~q&r | ~p&r; carries out are counted;
//   - the two-mode adder alternates in runs of random length between forward
//     (add p, q, r with ancillas 0, 1, compared as above) and back (roll the
//     last forward result back, which must give that operation's p, q, r and
//     the constants 0, 1). Forward operations, back operations and mode
//     switches are counted.
// Every counted mechanism (swap, pass, carry, forward, back, mode switch) must
// happen at least once. The top has no parameters, so this is also the
// full-size run. A watchdog fails the run after 5000 cycles.
module tb_fredkin_top;
  import fredkin_pkg::*;

  localparam int OPS = 1000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_swap = 0, n_pass = 0, n_carry = 0, n_fwd = 0, n_back = 0, n_switch = 0;

  fg_side_t     gate_in, gate_out;
  logic         add5_p, add5_q, add5_r;
  adder_right_t add5_out;
  logic         addsyn_p, addsyn_q, addsyn_r;
  adder_right_t addsyn_out;
  fg_mode_e     addbd_mode;
  adder_left_t  addbd_left_i, addbd_left_o;
  adder_right_t addbd_right_i, addbd_right_o;

  fredkin_top dut (.*);

  localparam logic [2:0] TABLE [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111
  };

  function automatic adder_right_t add_ref(input logic [2:0] pqr);
    logic [1:0] total;
    logic pp, qq, rr;
    {pp, qq, rr} = pqr;
    total = 2'(pp) + 2'(qq) + 2'(rr);
    return '{p: pp, q: qq, sum: total[0], carry: total[1],
             g: (~pp & ~qq) | (~qq & rr) | (~pp & rr)};
  endfunction

  task automatic check(input string what, input logic [4:0] got, input logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("%-12s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [2:0] g_w, a_w, bd_w, last_w;
    adder_right_t last_out;
    fg_mode_e next_mode;
    int run_left;
    gate_in = '0;
    {add5_p, add5_q, add5_r} = '0;
    {addsyn_p, addsyn_q, addsyn_r} = '0;
    addbd_mode = MODE_FORWARD;
    addbd_left_i = '0;
    addbd_right_i = '0;
    last_w = 3'b000;
    last_out = add_ref(3'b000);
    run_left = 0;
    next_mode = MODE_FORWARD;
    for (int n = 0; n < OPS; n++) begin
      g_w  = 3'($urandom);
      a_w  = 3'($urandom);
      bd_w = 3'($urandom);
      if (run_left == 0) begin
        run_left = 1 + int'($urandom_range(4));
        // Back mode needs something to roll back: start forward.
        next_mode = (n == 0 || addbd_mode == MODE_BACK) ? MODE_FORWARD : MODE_BACK;
      end
      run_left--;
      @(negedge clk);
      gate_in = g_w;
      {add5_p, add5_q, add5_r} = a_w;
      {addsyn_p, addsyn_q, addsyn_r} = a_w;
      if (next_mode != addbd_mode) n_switch++;
      addbd_mode = next_mode;
      if (addbd_mode == MODE_FORWARD) begin
        addbd_left_i = '{p: bd_w[2], q: bd_w[1], r: bd_w[0], anc0: 1'b0, anc1: 1'b1};
        addbd_right_i = 5'($urandom);
      end else begin
        addbd_right_i = last_out;
        addbd_left_i = 5'($urandom);
      end
      @(posedge clk);
      check("gate", gate_out, TABLE[g_w]);
      if (g_w[2]) n_swap++; else n_pass++;
      check("classic adder", add5_out, add_ref(a_w));
      check("synthesized adder", addsyn_out, add_ref(a_w));
      if (add_ref(a_w).carry) n_carry++;
      if (addbd_mode == MODE_FORWARD) begin
        check("two-mode adder forward", addbd_right_o, add_ref(bd_w));
        check("two-mode adder forward idle end", addbd_left_o, 5'b0);
        last_w = bd_w;
        last_out = addbd_right_o;
        n_fwd++;
      end else begin
        check("two-mode adder back", addbd_left_o, {last_w, 2'b01});
        check("two-mode adder back idle end", addbd_right_o, 5'b0);
        n_back++;
      end
    end
    need("swap", n_swap);
    need("pass", n_pass);
    need("carry", n_carry);
    need("forward", n_fwd);
    need("back", n_back);
    need("mode switch", n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
