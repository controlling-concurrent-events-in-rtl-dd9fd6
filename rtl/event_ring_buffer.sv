// event_ring_buffer: input event buffer of an IEC 61499 function block.
//
// Every event input is a single-bit wire that is high for one clock cycle per
// event. Several wires may carry the same event type (fan-in: each source FB
// gets its own wire), so that events arriving in the same tick are all kept
// instead of being merged. WIRE_TYPE gives the event type of each wire (8 bits
// per wire, wire 0 in the low byte). By default wires are grouped by type with
// FANIN wires each, wire i carrying type i / FANIN (for FANIN = 2: a_1, a_2,
// b_1, b_2, ...); any other map, for example types with different fan-in
// (a_1, a_2, b_1, b_2, c), is given by setting N_INS and WIRE_TYPE.
//
// On each falling clock edge the buffer walks the wires in index order. Every
// active wire stores its event type and the current data inputs into the slot
// at the head pointer, and the head pointer moves to the next slot, wrapping
// from the last slot to the first. Up to N_PAR_WRITES events are stored in one
// tick. When the slot after the head is the tail slot (head + 1 == tail) the
// buffer is full: the event is not stored and the sticky error flag
// `overflow` is set. One slot therefore always stays empty, so DEPTH slots hold
// at most DEPTH - 1 events.
//
// The consumer (an Execution Unit) owns the tail pointer and drives it in on
// `tail_ptr`; it advances it on the rising edge. The entry at the tail is
// presented combinationally on rd_type / rd_data with rd_valid = (head != tail).
//
// Following the source design: the falling-edge write, per-wire fan-in inputs,
// the storage of the related data with each event, the in-order multi-write in
// one tick, the head+1 == tail full test and the error flag. Own choices:
// the wire-to-type map as a parameter, active-low asynchronous reset (which also clears
// the flag), dropping events beyond N_PAR_WRITES in one tick (they also set
// the flag), and one shared data bus stored with every event.
module event_ring_buffer
  import iec61499_pkg::*;
#(
  parameter int unsigned N_TYPES      = 2,   // number of event types
  parameter int unsigned FANIN        = 1,   // wires per event type (default map)
  parameter int unsigned DEPTH        = 4,   // memory slots
  parameter int unsigned N_PAR_WRITES = 4,   // events stored per clock tick
  parameter int unsigned DATA_W       = 32,  // width of the related data
  parameter int unsigned N_INS        = N_TYPES * FANIN,  // event wires
  parameter logic [N_INS-1:0][7:0] WIRE_TYPE = (N_INS * 8)'(uniform_wire_map(FANIN)),
  localparam int unsigned PTR_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned TYPE_W = (N_TYPES > 1) ? $clog2(N_TYPES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // event and data inputs, sampled on the falling edge
  input  logic [N_INS-1:0]  ev_in,
  input  logic [DATA_W-1:0] data_in,
  // consumer side
  input  logic [PTR_W-1:0]  tail_ptr,
  output logic              rd_valid,
  output logic [TYPE_W-1:0] rd_type,
  output logic [DATA_W-1:0] rd_data,
  // status
  output logic [PTR_W-1:0]  head_ptr,
  output logic              overflow
);

  typedef struct packed {
    logic [TYPE_W-1:0] ev_type;
    logic [DATA_W-1:0] data;
  } slot_t;

  slot_t             mem [DEPTH];
  logic [PTR_W-1:0]  head_q, head_d;
  logic              ovf_d;
  logic [DEPTH-1:0]  slot_we;
  logic [TYPE_W-1:0] slot_type [DEPTH];

  function automatic logic [PTR_W-1:0] ptr_next(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + PTR_W'(1);
  endfunction

  // Walk the event wires in order and allocate consecutive slots
  always_comb begin
    logic [PTR_W-1:0] h;
    int unsigned      n_writes;
    h        = head_q;
    n_writes = 0;
    ovf_d    = 1'b0;
    slot_we  = '0;
    for (int unsigned s = 0; s < DEPTH; s++) slot_type[s] = '0;
    for (int unsigned i = 0; i < N_INS; i++) begin
      if (ev_in[i]) begin
        if (n_writes >= N_PAR_WRITES || ptr_next(h) == tail_ptr) begin
          ovf_d = 1'b1;
        end else begin
          slot_we[h]   = 1'b1;
          slot_type[h] = TYPE_W'(WIRE_TYPE[i]);
          h            = ptr_next(h);
          n_writes     = n_writes + 1;
        end
      end
    end
    head_d = h;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q   <= '0;
      overflow <= 1'b0;
      for (int unsigned s = 0; s < DEPTH; s++) mem[s] <= '0;
    end else begin
      head_q <= head_d;
      if (ovf_d) overflow <= 1'b1;
      for (int unsigned s = 0; s < DEPTH; s++)
        if (slot_we[s]) mem[s] <= '{ev_type: slot_type[s], data: data_in};
    end
  end

  assign head_ptr = head_q;
  assign rd_valid = (head_q != tail_ptr);
  assign rd_type  = mem[tail_ptr].ev_type;
  assign rd_data  = mem[tail_ptr].data;

  initial begin
    assert (N_INS <= MAX_EVENT_WIRES) else $error("too many event wires");
    for (int unsigned i = 0; i < N_INS; i++)
      assert (int'(WIRE_TYPE[i]) < int'(N_TYPES)) else $error("wire %0d maps to no event type", i);
  end

  // The consumer may only move the tail within the buffer's slots
  a_tail_in_range: assert property (@(posedge clk) disable iff (!rst_n) int'(tail_ptr) < int'(DEPTH));

endmodule
