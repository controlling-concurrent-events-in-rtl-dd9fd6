// tb_composite_calculator: end-to-end test of the whole design, the composite
// FB wrapping the BasicCalculator, with every parameter at its default (two
// fan-in wires per event type, four-slot buffers, four writes per tick).
//
// A cycle-accurate reference model follows an event through both levels: the
// CFB buffer stores the active wires (ADD wires, then SUB wires) at a falling
// edge while it holds fewer than three entries, else it flags an overflow; its
// ExU forwards the oldest entry at the next rising edge; the calculator's
// buffer stores it at the following falling edge and the calculator executes
// it at the rising edge after that. After every edge the testbench compares
// DONE, x, the calculator's ECC state, both head pointers and both overflow
// flags with the model.
//
// Directed parts: a lone ADD (a = 10, b = 5) must give DONE and x = 15 one
// full clock cycle later than it would in the calculator alone; four events in
// one tick (both fan-in wires of ADD and of SUB) fill the buffer and overflow it.
// The random part then has to make each mechanism happen at least once:
// simultaneous events, fan-in of one event type, CFB buffer overflow,
// back-to-back execution, both algorithms and pointer wrap-around.
`timescale 1ns/1ps
module tb_composite_calculator;
  import iec61499_pkg::*;

  localparam int unsigned FANIN = 2, DEPTH = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FANIN-1:0] ev_add = '0, ev_sub = '0;
  int_t             a = '0, b = '0;
  logic             done;
  int_t             x;
  logic [1:0]       cfb_head_ptr, cfb_tail_ptr, calc_head_ptr, calc_tail_ptr;
  logic             cfb_overflow, calc_overflow;
  calc_state_e      calc_state;

  composite_calculator dut (
    .clk(clk), .rst_n(rst_n), .ev_add(ev_add), .ev_sub(ev_sub), .a(a), .b(b),
    .done(done), .x(x),
    .cfb_head_ptr(cfb_head_ptr), .cfb_tail_ptr(cfb_tail_ptr), .cfb_overflow(cfb_overflow),
    .calc_head_ptr(calc_head_ptr), .calc_tail_ptr(calc_tail_ptr), .calc_state(calc_state),
    .calc_overflow(calc_overflow));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  typedef struct { bit is_sub; int a; int b; } entry_t;
  entry_t      outer_q[$], inner_q[$];
  bit          fwd_valid = 0;
  entry_t      fwd;
  int          exp_outer_head = 0, exp_inner_head = 0, exp_x = 0, exp_outer_tail = 0;
  bit          exp_done = 0, exp_ovf = 0;
  calc_state_e exp_state = ST_RDY;
  // mechanism counters
  int n_simul = 0, n_fanin = 0, n_ovf = 0, n_b2b = 0, n_add = 0, n_sub = 0, n_wrap = 0;

  task automatic tick(input logic [FANIN-1:0] add, input logic [FANIN-1:0] sub,
                      input int_t av, input int_t bv);
    logic [2*FANIN-1:0] wires;
    int stored = 0;
    ev_add = add;
    ev_sub = sub;
    a = av;
    b = bv;
    wires = {sub, add};
    if (add == '1 || sub == '1) n_fanin++;
    @(negedge clk);
    // inner buffer takes what the CFB ExU forwarded
    if (fwd_valid) begin
      inner_q.push_back(fwd);
      exp_inner_head = (exp_inner_head + 1) % DEPTH;
    end
    // CFB buffer takes the active wires in order
    for (int i = 0; i < 2 * FANIN; i++) begin
      if (wires[i]) begin
        if (outer_q.size() == DEPTH - 1) begin
          exp_ovf = 1;
          n_ovf++;
        end else begin
          outer_q.push_back('{is_sub: (i >= FANIN), a: int'(av), b: int'(bv)});
          exp_outer_head = (exp_outer_head + 1) % DEPTH;
          stored++;
        end
      end
    end
    if (stored > 1) n_simul++;
    #1;
    check(int'(cfb_head_ptr) == exp_outer_head, "CFB head pointer");
    check(int'(calc_head_ptr) == exp_inner_head, "calculator head pointer");
    check(cfb_overflow == exp_ovf, "CFB overflow flag");
    check(!calc_overflow, "calculator buffer never overflows");
    @(posedge clk);
    #1;
    // calculator executes, CFB ExU forwards
    if (inner_q.size() > 0) begin
      entry_t e;
      e = inner_q.pop_front();
      exp_x     = e.is_sub ? e.a - e.b : e.a + e.b;
      exp_state = e.is_sub ? ST_SUB : ST_ADD;
      if (exp_done) n_b2b++;
      if (e.is_sub) n_sub++; else n_add++;
      exp_done  = 1;
    end else begin
      exp_state = ST_RDY;
      exp_done  = 0;
    end
    fwd_valid = (outer_q.size() > 0);
    if (fwd_valid) begin
      fwd = outer_q.pop_front();
      if (exp_outer_tail == DEPTH - 1) n_wrap++;
      exp_outer_tail = (exp_outer_tail + 1) % DEPTH;
    end
    check(done == exp_done, "DONE");
    check(x == int_t'(exp_x), $sformatf("x %0d exp %0d", x, int_t'(exp_x)));
    check(calc_state == exp_state, "calculator state");
    check(int'(cfb_tail_ptr) == exp_outer_tail, "CFB tail pointer");
    ev_add = '0;
    ev_sub = '0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // lone ADD 10 + 5: not done after half a cycle, done one cycle later
    tick(2'b01, 2'b00, 16'sd10, 16'sd5);
    check(!done, "no result half a cycle after the event (CFB adds a cycle)");
    tick('0, '0, 16'sd0, 16'sd0);
    check(done && x == 16'sd15 && calc_state == ST_ADD, "x = 15 one cycle later");
    tick('0, '0, 16'sd0, 16'sd0);
    check(!done && calc_state == ST_RDY, "back to RDY");
    // four simultaneous events through fan-in: three fit, one overflows
    tick(2'b11, 2'b11, 16'sd8, 16'sd2);
    check(cfb_overflow, "fourth simultaneous event overflows the CFB buffer");
    repeat (6) tick('0, '0, 16'sd0, 16'sd0);
    // random traffic
    for (int n = 0; n < 5000; n++) begin
      logic [FANIN-1:0] ea, es;
      ea = FANIN'($urandom) & FANIN'($urandom);
      es = FANIN'($urandom) & FANIN'($urandom);
      tick(ea, es, int_t'($urandom), int_t'($urandom));
    end
    repeat (8) tick('0, '0, 16'sd0, 16'sd0);
    check(n_simul > 0, "simultaneous events");
    check(n_fanin > 0, "fan-in of one event type");
    check(n_ovf > 0, "CFB buffer overflow");
    check(n_b2b > 0, "back-to-back execution");
    check(n_add > 0 && n_sub > 0, "both algorithms");
    check(n_wrap > 0, "pointer wrap-around");
    $display("simultaneous=%0d fan-in=%0d overflow=%0d back-to-back=%0d add=%0d sub=%0d wrap=%0d",
             n_simul, n_fanin, n_ovf, n_b2b, n_add, n_sub, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
