// basic_calculator: the BasicCalculator basic function block (BFB).
//
// A BFB is an input event ring buffer followed by an Execution Unit. Events
// ADD and SUB arrive as one-cycle pulses, each type on FANIN wires of its own
// (one per connected source FB); the data inputs a and b are stored with every
// event on the falling clock edge. On the rising edge the ExU executes the
// oldest stored event: ADD gives x = a + b, SUB gives x = a - b, and DONE pulses
// for one cycle with the new x.
//
// Interface: ev_add / ev_sub (FANIN wires each), a, b (INT) in; done, x (INT)
// out. head_ptr, tail_ptr, state and the sticky overflow flag are brought out
// for observation. Timing: an event present before a falling edge is stored on
// that edge and, if it is the only one queued, executed on the next rising
// edge; DONE and x change on that rising edge. Simultaneous events are stored
// in the order ADD wires then SUB wires and executed one per cycle.
//
// The structure (buffer + ExU, falling-edge write, rising-edge execute, buffer
// of four slots all writable in one tick) follows the source design; the fan-in
// count per event is a parameter chosen here.
module basic_calculator
  import iec61499_pkg::*;
#(
  parameter int unsigned FANIN        = 1,  // wires per input event
  parameter int unsigned DEPTH        = 4,  // ring buffer slots
  parameter int unsigned N_PAR_WRITES = 4,  // events stored per tick
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [FANIN-1:0] ev_add,
  input  logic [FANIN-1:0] ev_sub,
  input  int_t             a,
  input  int_t             b,
  output logic             done,
  output int_t             x,
  output logic [PTR_W-1:0] head_ptr,
  output logic [PTR_W-1:0] tail_ptr,
  output calc_state_e      state,
  output logic             overflow
);

  logic       rd_valid;
  logic [0:0] rd_type;
  calc_data_t rd_data;
  calc_data_t data_in;

  assign data_in = '{a: a, b: b};

  event_ring_buffer #(
    .N_TYPES     (CALC_N_EVENTS),
    .FANIN       (FANIN),
    .DEPTH       (DEPTH),
    .N_PAR_WRITES(N_PAR_WRITES),
    .DATA_W      (CALC_DATA_W)
  ) u_buffer (
    .clk     (clk),
    .rst_n   (rst_n),
    .ev_in   ({ev_sub, ev_add}),   // ADD wires first, then SUB wires
    .data_in (data_in),
    .tail_ptr(tail_ptr),
    .rd_valid(rd_valid),
    .rd_type (rd_type),
    .rd_data (rd_data),
    .head_ptr(head_ptr),
    .overflow(overflow)
  );

  calc_exu #(
    .DEPTH(DEPTH)
  ) u_exu (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_valid(rd_valid),
    .rd_type (calc_event_e'(rd_type)),
    .rd_data (rd_data),
    .tail_ptr(tail_ptr),
    .done    (done),
    .x       (x),
    .state   (state)
  );

endmodule
