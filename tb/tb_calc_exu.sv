// tb_calc_exu: self-checking test of the BasicCalculator Execution Unit.
//
// The testbench stands in for the ring buffer: it keeps DEPTH slots and a head
// pointer, writes at most one event (ADD or SUB with random a, b) per falling
// edge while not full, and presents the slot at the ExU's tail pointer. After
// every rising edge it checks, against its own prediction: the tail pointer
// (advanced only when an event was waiting), the ECC state (ADD/SUB after an
// executed event, RDY otherwise), DONE (high exactly in the cycle after an
// event was taken) and x (a + b for ADD, a - b for SUB, held otherwise).
// A directed start reproduces the documented step: ADD with a = 10, b = 5
// gives state ADD, DONE high and x = 15 half a cycle after it was buffered,
// then state RDY and DONE low one cycle later with x still 15.
`timescale 1ns/1ps
module tb_calc_exu;
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

  // stand-in buffer
  calc_event_e mem_type [DEPTH];
  calc_data_t  mem_data [DEPTH];
  int          head = 0;

  logic        rd_valid;
  calc_event_e rd_type;
  calc_data_t  rd_data;
  logic [1:0]  tail_ptr;
  logic        done;
  int_t        x;
  calc_state_e state;

  assign rd_valid = (2'(head) != tail_ptr);
  assign rd_type  = mem_type[tail_ptr];
  assign rd_data  = mem_data[tail_ptr];

  calc_exu #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .rd_valid(rd_valid), .rd_type(rd_type), .rd_data(rd_data),
    .tail_ptr(tail_ptr), .done(done), .x(x), .state(state));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // model state
  int          exp_tail = 0;
  calc_state_e exp_state = ST_RDY;
  logic        exp_done = 1'b0;
  int          exp_x = 0;
  int          n_add = 0, n_sub = 0, n_back_to_back = 0, n_idle = 0;

  // push one event on the falling edge (if not full)
  task automatic push_on_negedge(input bit en, input calc_event_e t, input int_t a, input int_t b);
    @(negedge clk);
    push_now(en, t, a, b);
  endtask

  // second write in the same falling edge (a burst)
  task automatic push_now(input bit en, input calc_event_e t, input int_t a, input int_t b);
    if (en && ((head + 1) % DEPTH) != exp_tail) begin
      mem_type[head] = t;
      mem_data[head] = '{a: a, b: b};
      head = (head + 1) % DEPTH;
    end
  endtask

  // predict and check the rising edge
  task automatic step_posedge();
    bit          v;
    calc_event_e t;
    calc_data_t  d;
    v = (head != exp_tail);
    t = mem_type[exp_tail];
    d = mem_data[exp_tail];
    @(posedge clk);
    #1;
    if (v) begin
      exp_tail  = (exp_tail + 1) % DEPTH;
      exp_state = (t == EV_ADD) ? ST_ADD : ST_SUB;
      exp_x     = (t == EV_ADD) ? int'(d.a) + int'(d.b) : int'(d.a) - int'(d.b);
      if (exp_done) n_back_to_back++;
      exp_done  = 1'b1;
      if (t == EV_ADD) n_add++; else n_sub++;
    end else begin
      exp_state = ST_RDY;
      exp_done  = 1'b0;
      n_idle++;
    end
    check(int'(tail_ptr) == exp_tail, $sformatf("tail %0d exp %0d", tail_ptr, exp_tail));
    check(state == exp_state, $sformatf("state %s exp %s", state.name(), exp_state.name()));
    check(done == exp_done, "done");
    check(x == int_t'(exp_x), $sformatf("x %0d exp %0d", x, int_t'(exp_x)));
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      mem_type[i] = EV_ADD;
      mem_data[i] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // documented step: ADD, a = 10, b = 5
    push_on_negedge(1, EV_ADD, 16'sd10, 16'sd5);
    check(state == ST_RDY && !done, "ready before the event");
    step_posedge();
    check(state == ST_ADD && done && x == 16'sd15 && tail_ptr == 2'd1, "ADD executed, x = 15, TP = 1");
    push_on_negedge(0, EV_ADD, '0, '0);
    step_posedge();
    check(state == ST_RDY && !done && x == 16'sd15, "back to RDY, x held");
    // SUB then ADD back to back
    push_on_negedge(1, EV_SUB, 16'sd7, 16'sd9);
    step_posedge();
    check(done && x == -16'sd2, "SUB 7 - 9 = -2");
    push_on_negedge(1, EV_ADD, 16'sd3, 16'sd4);
    step_posedge();
    check(done && state == ST_ADD && x == 16'sd7, "ADD 3 + 4 = 7 directly after SUB");
    // random traffic, including bursts that fill the stand-in buffer
    for (int n = 0; n < 4000; n++) begin
      push_on_negedge(($urandom % 4) != 0, calc_event_e'($urandom % 2), int_t'($urandom), int_t'($urandom));
      if (($urandom % 5) == 0) push_now(1, calc_event_e'($urandom % 2), int_t'($urandom), int_t'($urandom));
      step_posedge();
    end
    check(n_add > 0 && n_sub > 0, "both algorithms ran");
    check(n_back_to_back > 0, "back-to-back events ran");
    check(n_idle > 0, "idle cycles seen");
    $display("add=%0d sub=%0d back-to-back=%0d idle=%0d", n_add, n_sub, n_back_to_back, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
