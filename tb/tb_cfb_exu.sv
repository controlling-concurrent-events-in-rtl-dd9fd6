// tb_cfb_exu: self-checking test of the composite-FB Execution Unit.
//
// The testbench stands in for the CFB's ring buffer (DEPTH slots, at most one
// write per falling edge while not full) and checks after every rising edge
// that the ExU advanced the tail pointer exactly when an entry was waiting,
// raised exactly the output event wire of that entry's type for one cycle,
// and put the entry's data on data_out (held while idle). Three event types are
// used so that the one-hot decode is exercised beyond two wires.
`timescale 1ns/1ps
module tb_cfb_exu;

  localparam int unsigned NT = 3, DW = 24, DEPTH = 4;

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

  logic [1:0]    mem_type [DEPTH];
  logic [DW-1:0] mem_data [DEPTH];
  int            head = 0;

  logic          rd_valid;
  logic [1:0]    rd_type;
  logic [DW-1:0] rd_data;
  logic [1:0]    tail_ptr;
  logic [NT-1:0] ev_out;
  logic [DW-1:0] data_out;

  assign rd_valid = (2'(head) != tail_ptr);
  assign rd_type  = mem_type[tail_ptr];
  assign rd_data  = mem_data[tail_ptr];

  cfb_exu #(.N_TYPES(NT), .DATA_W(DW), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .rd_valid(rd_valid), .rd_type(rd_type), .rd_data(rd_data),
    .tail_ptr(tail_ptr), .ev_out(ev_out), .data_out(data_out));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  int            exp_tail = 0;
  logic [NT-1:0] exp_ev = '0;
  logic [DW-1:0] exp_data = '0;
  int            n_fwd [NT];
  int            n_idle = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      mem_type[i] = '0;
      mem_data[i] = '0;
    end
    for (int i = 0; i < NT; i++) n_fwd[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(ev_out == '0 && data_out == '0 && tail_ptr == '0, "reset values");
    for (int n = 0; n < 4000; n++) begin
      bit          v;
      int          t;
      logic [DW-1:0] d;
      @(negedge clk);
      if (($urandom % 3) != 0 && ((head + 1) % DEPTH) != exp_tail) begin
        mem_type[head] = 2'($urandom % NT);
        mem_data[head] = DW'($urandom);
        head = (head + 1) % DEPTH;
      end
      v = (head != exp_tail);
      t = int'(mem_type[exp_tail]);
      d = mem_data[exp_tail];
      @(posedge clk);
      #1;
      if (v) begin
        exp_tail = (exp_tail + 1) % DEPTH;
        exp_ev   = NT'(0);
        exp_ev[t] = 1'b1;
        exp_data = d;
        n_fwd[t]++;
      end else begin
        exp_ev = '0;
        n_idle++;
      end
      check(int'(tail_ptr) == exp_tail, "tail pointer");
      check(ev_out == exp_ev, $sformatf("ev_out %b exp %b", ev_out, exp_ev));
      check(data_out == exp_data, "data_out");
    end
    for (int i = 0; i < NT; i++) check(n_fwd[i] > 0, $sformatf("type %0d forwarded", i));
    check(n_idle > 0, "idle cycles seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
