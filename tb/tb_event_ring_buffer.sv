// tb_event_ring_buffer: self-checking test of the event ring buffer.
//
// Three instances run side by side: the default four-slot buffer with two
// event types on two fan-in wires each (four wires, up to four writes per
// tick); an eight-slot buffer limited to two writes per tick; and a six-slot
// buffer with uneven fan-in given by an explicit wire map: three types on five
// wires a_1, a_2, b_1, b_2, c, as when one source FB drives a and b and a
// second drives a, b and c. Each is compared against
// a queue model: on every falling edge the model walks the wires in order and
// appends (type of the wire, data) while fewer than DEPTH-1 entries are held
// and fewer than N_PAR_WRITES were stored this tick; anything else is an
// overflow. The testbench plays the consumer: it owns tail_ptr and, after each
// rising edge, pops the head entry at random. Checked after every falling edge:
// head pointer, rd_valid, the entry at the tail (type and data), the sticky
// overflow flag. A directed start reproduces the documented sequence (one SUB,
// then ADD and SUB together: head 0 -> 1 -> 3, slots SUB, ADD, SUB).
`timescale 1ns/1ps
module tb_event_ring_buffer;

  localparam int unsigned NT = 2;
  localparam int unsigned DW = 32;

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

  // ---------------- instance A: FANIN 2, DEPTH 4, 4 writes per tick
  localparam int unsigned FA = 2, DA = 4, PA = 4, NA = NT * FA;
  logic [NA-1:0] ev_a = '0;
  logic [DW-1:0] data_a = '0;
  logic [1:0]    tail_a = '0;
  logic          valid_a, ovf_a;
  logic [0:0]    type_a;
  logic [DW-1:0] rdata_a;
  logic [1:0]    head_a;

  event_ring_buffer #(.N_TYPES(NT), .FANIN(FA), .DEPTH(DA), .N_PAR_WRITES(PA), .DATA_W(DW)) dut_a (
    .clk(clk), .rst_n(rst_n), .ev_in(ev_a), .data_in(data_a), .tail_ptr(tail_a),
    .rd_valid(valid_a), .rd_type(type_a), .rd_data(rdata_a), .head_ptr(head_a), .overflow(ovf_a));

  // ---------------- instance B: FANIN 1, DEPTH 8, 2 writes per tick
  localparam int unsigned FB = 1, DB = 8, PB = 2, NB = NT * FB;
  logic [NB-1:0] ev_b = '0;
  logic [DW-1:0] data_b = '0;
  logic [2:0]    tail_b = '0;
  logic          valid_b, ovf_b;
  logic [0:0]    type_b;
  logic [DW-1:0] rdata_b;
  logic [2:0]    head_b;

  event_ring_buffer #(.N_TYPES(NT), .FANIN(FB), .DEPTH(DB), .N_PAR_WRITES(PB), .DATA_W(DW)) dut_b (
    .clk(clk), .rst_n(rst_n), .ev_in(ev_b), .data_in(data_b), .tail_ptr(tail_b),
    .rd_valid(valid_b), .rd_type(type_b), .rd_data(rdata_b), .head_ptr(head_b), .overflow(ovf_b));

  // ---------------- instance C: uneven fan-in a_1, a_2, b_1, b_2, c; DEPTH 6
  localparam int unsigned NTC = 3, DC = 6, PC = 5, NC = 5;
  localparam logic [NC-1:0][7:0] MAP_C = {8'd2, 8'd1, 8'd1, 8'd0, 8'd0};
  logic [NC-1:0] ev_c = '0;
  logic [DW-1:0] data_c = '0;
  logic [2:0]    tail_c = '0;
  logic          valid_c, ovf_c;
  logic [1:0]    type_c;
  logic [DW-1:0] rdata_c;
  logic [2:0]    head_c;

  event_ring_buffer #(.N_TYPES(NTC), .DEPTH(DC), .N_PAR_WRITES(PC), .DATA_W(DW), .N_INS(NC),
                      .WIRE_TYPE(MAP_C)) dut_c (
    .clk(clk), .rst_n(rst_n), .ev_in(ev_c), .data_in(data_c), .tail_ptr(tail_c),
    .rd_valid(valid_c), .rd_type(type_c), .rd_data(rdata_c), .head_ptr(head_c), .overflow(ovf_c));

  // ---------------- reference models
  typedef struct { int ev_type; logic [DW-1:0] data; } entry_t;
  entry_t q_a[$], q_b[$], q_c[$];
  int head_model_a = 0, head_model_b = 0, head_model_c = 0;
  bit ovf_model_a = 0, ovf_model_b = 0, ovf_model_c = 0;
  int n_ovf_a = 0, n_ovf_b = 0, n_ovf_c = 0, n_multi = 0, n_wrap = 0, n_type_c2 = 0;
  int map_a[8] = '{0, 0, 1, 1, 0, 0, 0, 0};   // two wires per type
  int map_b[8] = '{0, 1, 0, 0, 0, 0, 0, 0};   // one wire per type
  int map_c[8] = '{0, 0, 1, 1, 2, 0, 0, 0};   // a_1, a_2, b_1, b_2, c

  task automatic model_write(input logic [7:0] ev, input int n_ins, input int map[8], input int depth,
                             input int par, input logic [DW-1:0] data, ref entry_t q[$],
                             ref int head, ref bit ovf, ref int n_ovf);
    int stored = 0;
    for (int i = 0; i < n_ins; i++) begin
      if (ev[i]) begin
        if (q.size() == depth - 1 || stored == par) begin
          ovf = 1;
          n_ovf++;
        end else begin
          q.push_back('{ev_type: map[i], data: data});
          head = (head + 1) % depth;
          stored++;
        end
      end
    end
    if (stored > 1) n_multi++;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  task automatic check_all();
    check(head_c == 3'(head_model_c), $sformatf("C head %0d exp %0d", head_c, head_model_c));
    check(valid_c == (q_c.size() > 0), "C rd_valid");
    check(ovf_c == ovf_model_c, "C overflow flag");
    if (q_c.size() > 0) begin
      check(type_c == 2'(q_c[0].ev_type), "C rd_type");
      check(rdata_c == q_c[0].data, "C rd_data");
      if (q_c[0].ev_type == 2) n_type_c2++;
    end
    check(head_a == 2'(head_model_a), $sformatf("A head %0d exp %0d", head_a, head_model_a));
    check(valid_a == (q_a.size() > 0), "A rd_valid");
    check(ovf_a == ovf_model_a, "A overflow flag");
    if (q_a.size() > 0) begin
      check(type_a == 1'(q_a[0].ev_type), "A rd_type");
      check(rdata_a == q_a[0].data, "A rd_data");
    end
    check(head_b == 3'(head_model_b), $sformatf("B head %0d exp %0d", head_b, head_model_b));
    check(valid_b == (q_b.size() > 0), "B rd_valid");
    check(ovf_b == ovf_model_b, "B overflow flag");
    if (q_b.size() > 0) begin
      check(type_b == 1'(q_b[0].ev_type), "B rd_type");
      check(rdata_b == q_b[0].data, "B rd_data");
    end
  endtask

  // one tick: inputs applied after the rising edge, stored at the falling edge
  task automatic tick(input logic [NA-1:0] ea, input logic [NB-1:0] eb, input bit pop_a, input bit pop_b);
    ev_a   = ea;
    ev_b   = eb;
    ev_c   = NC'($urandom) & NC'($urandom);
    data_a = $urandom;
    data_b = $urandom;
    data_c = $urandom;
    @(negedge clk);
    model_write(8'(ev_a), NA, map_a, DA, PA, data_a, q_a, head_model_a, ovf_model_a, n_ovf_a);
    model_write(8'(ev_b), NB, map_b, DB, PB, data_b, q_b, head_model_b, ovf_model_b, n_ovf_b);
    model_write(8'(ev_c), NC, map_c, DC, PC, data_c, q_c, head_model_c, ovf_model_c, n_ovf_c);
    #1 check_all();
    @(posedge clk);
    #1;
    if (pop_a && q_a.size() > 0) begin
      void'(q_a.pop_front());
      if (tail_a == 2'(DA - 1)) n_wrap++;
      tail_a = 2'((int'(tail_a) + 1) % DA);
    end
    if (($urandom % 3) != 0 && q_c.size() > 0) begin
      void'(q_c.pop_front());
      tail_c = 3'((int'(tail_c) + 1) % DC);
    end
    if (pop_b && q_b.size() > 0) begin
      void'(q_b.pop_front());
      tail_b = 3'((int'(tail_b) + 1) % DB);
    end
    #1;  // let the read port follow the new tail
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // documented sequence on instance A, type 0 = ADD, type 1 = SUB:
    // SUB alone, then ADD and SUB in the same tick, nothing consumed
    tick(4'b0100, 2'b00, 0, 0);
    check(head_a == 2'd1 && valid_a && type_a == 1'b1, "first SUB in slot 0, head 1");
    tick(4'b0101, 2'b00, 0, 0);
    check(head_a == 2'd3, "head advanced by two to 3");
    // full now: a further event is refused and flagged
    tick(4'b0010, 2'b00, 0, 0);
    check(ovf_a == 1'b1 && head_a == 2'd3, "overflow on full buffer");
    // drain: the consumer sees SUB (slot 0), ADD (slot 1), SUB (slot 2)
    check(type_a == 1'b1, "slot 0 holds SUB");
    tick('0, '0, 1, 1);
    check(tail_a == 2'd1 && type_a == 1'b0, "slot 1 holds ADD");
    tick('0, '0, 1, 1);
    check(tail_a == 2'd2 && type_a == 1'b1, "slot 2 holds SUB");
    repeat (3) tick('0, '0, 1, 1);
    check(!valid_a && tail_a == head_a, "drained");
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      logic [NA-1:0] ea;
      logic [NB-1:0] eb;
      ea = NA'($urandom) & NA'($urandom);
      eb = NB'($urandom);
      tick(ea, eb, ($urandom % 4) != 0, ($urandom % 3) != 0);
    end
    check(n_multi > 0, "simultaneous writes happened");
    check(n_ovf_b > 0, "write limit / overflow in B happened");
    check(n_wrap > 0, "pointer wrap happened");
    check(n_type_c2 > 0, "single-wire type c of the uneven map seen");
    $display("multi-writes=%0d overflows A=%0d B=%0d wraps=%0d", n_multi, n_ovf_a, n_ovf_b, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
