// tb_basic_calculator: self-checking test of the BasicCalculator BFB
// (ring buffer + Execution Unit) at its default size: one wire per event,
// four slots, four writes per tick.
//
// Inputs change just after a rising edge. The reference model appends, at each
// falling edge, ADD then SUB (whichever are active) with the current a, b while
// fewer than three entries are held (otherwise it predicts an overflow), and
// pops one entry at each rising edge, predicting DONE, x and the ECC state.
// Checked after each edge: head pointer, tail pointer, DONE, x, state and the
// overflow flag. Directed part: a lone SUB executes half a cycle after it is
// stored; ADD and SUB in one tick move the head pointer by two (1 -> 3) and are
// executed ADD first, on two consecutive rising edges, with DONE high for two
// cycles. Then random traffic, including bursts that overflow the buffer.
`timescale 1ns/1ps
module tb_basic_calculator;
  import iec61499_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        ev_add = 1'b0, ev_sub = 1'b0;
  int_t        a = '0, b = '0;
  logic        done, overflow;
  int_t        x;
  logic [1:0]  head_ptr, tail_ptr;
  calc_state_e state;

  basic_calculator dut (
    .clk(clk), .rst_n(rst_n), .ev_add(ev_add), .ev_sub(ev_sub), .a(a), .b(b),
    .done(done), .x(x), .head_ptr(head_ptr), .tail_ptr(tail_ptr), .state(state),
    .overflow(overflow));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  typedef struct { bit is_sub; int a; int b; } entry_t;
  entry_t      q[$];
  int          exp_head = 0, exp_tail = 0, exp_x = 0;
  bit          exp_done = 0, exp_ovf = 0;
  calc_state_e exp_state = ST_RDY;
  int          n_simul = 0, n_ovf = 0, n_b2b = 0;

  // one clock: apply inputs, falling-edge store, rising-edge execute
  task automatic tick(input bit add, input bit sub, input int_t av, input int_t bv);
    int stored = 0;
    ev_add = add;
    ev_sub = sub;
    a = av;
    b = bv;
    @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      if ((i == 0) ? add : sub) begin
        if (q.size() == DEPTH - 1) begin
          exp_ovf = 1;
          n_ovf++;
        end else begin
          q.push_back('{is_sub: (i == 1), a: int'(av), b: int'(bv)});
          exp_head = (exp_head + 1) % DEPTH;
          stored++;
        end
      end
    end
    if (stored == 2) n_simul++;
    #1;
    check(int'(head_ptr) == exp_head, $sformatf("head %0d exp %0d", head_ptr, exp_head));
    check(overflow == exp_ovf, "overflow flag");
    @(posedge clk);
    #1;
    if (q.size() > 0) begin
      entry_t e;
      e = q.pop_front();
      exp_tail  = (exp_tail + 1) % DEPTH;
      exp_x     = e.is_sub ? e.a - e.b : e.a + e.b;
      exp_state = e.is_sub ? ST_SUB : ST_ADD;
      if (exp_done) n_b2b++;
      exp_done  = 1;
    end else begin
      exp_state = ST_RDY;
      exp_done  = 0;
    end
    check(int'(tail_ptr) == exp_tail, "tail");
    check(done == exp_done, "done");
    check(x == int_t'(exp_x), $sformatf("x %0d exp %0d", x, int_t'(exp_x)));
    check(state == exp_state, "state");
    ev_add = 1'b0;
    ev_sub = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // lone SUB: stored at the falling edge, executed at the next rising edge
    tick(0, 1, 16'sd10, 16'sd5);
    check(head_ptr == 2'd1 && done && state == ST_SUB && x == 16'sd5, "SUB 10 - 5 = 5");
    // ADD and SUB in the same tick
    tick(1, 1, 16'sd3, 16'sd1);
    check(head_ptr == 2'd3, "head moved by two to 3");
    check(done && state == ST_ADD && x == 16'sd4, "ADD executed first: 3 + 1 = 4");
    tick(0, 0, 16'sd0, 16'sd0);
    check(done && state == ST_SUB && x == 16'sd2, "then SUB: 3 - 1 = 2, DONE high for a second cycle");
    tick(0, 0, 16'sd0, 16'sd0);
    check(!done && state == ST_RDY && x == 16'sd2, "idle: RDY, x held");
    // random traffic with bursts
    for (int n = 0; n < 3000; n++) begin
      bit burst;
      burst = ($urandom % 8) < 3;
      tick(burst | ($urandom % 3 == 0), burst | ($urandom % 3 == 0), int_t'($urandom), int_t'($urandom));
    end
    check(n_simul > 0, "simultaneous events happened");
    check(n_ovf > 0, "overflow happened");
    check(n_b2b > 0, "back-to-back execution happened");
    $display("simultaneous=%0d overflows=%0d back-to-back=%0d", n_simul, n_ovf, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
