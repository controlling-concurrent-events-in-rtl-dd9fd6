// composite_calculator: a composite function block (CFB) whose only element is
// the BasicCalculator; the top of this design.
//
// The CFB's interface matches the calculator's: events ADD and SUB, data a and
// b in; event DONE and data x out. Each input event type arrives on FANIN wires,
// one per source FB connected to it (event fan-in). The CFB stores all events
// that arrive in one tick, with a and b, in its own ring buffer on the falling
// edge; its ExU forwards them one per rising edge to the calculator's ADD/SUB
// inputs with the stored a and b; the calculator buffers them again on the next
// falling edge and executes them on the rising edge after. DONE and x of the
// calculator are the CFB's outputs directly.
//
// Timing: a single event arriving before falling edge n is stored at edge n,
// forwarded at the following rising edge, stored by the calculator at falling
// edge n+1 and executed (DONE high, x valid) at the rising edge after that: one
// clock cycle later than the same calculator used directly. The outer buffer
// accepts all four input wires in one tick, but being four slots with one kept
// free it holds at most three events; a fourth sets cfb_overflow.
//
// The containment, the extra ring buffer in the CFB and the resulting one-cycle
// delay follow the source design. FANIN = 2 (two source FBs per event type,
// four event wires) is a choice made here so that the buffer's four parallel
// writes can be reached.
module composite_calculator
  import iec61499_pkg::*;
#(
  parameter int unsigned FANIN        = 2,  // wires per input event of the CFB
  parameter int unsigned DEPTH        = 4,  // slots of each ring buffer
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
  // observation
  output logic [PTR_W-1:0] cfb_head_ptr,
  output logic [PTR_W-1:0] cfb_tail_ptr,
  output logic             cfb_overflow,
  output logic [PTR_W-1:0] calc_head_ptr,
  output logic [PTR_W-1:0] calc_tail_ptr,
  output calc_state_e      calc_state,
  output logic             calc_overflow
);

  logic       rd_valid;
  logic [0:0] rd_type;
  calc_data_t rd_data;
  calc_data_t fwd_data;
  logic [1:0] fwd_ev;     // [0] = ADD, [1] = SUB

  event_ring_buffer #(
    .N_TYPES     (CALC_N_EVENTS),
    .FANIN       (FANIN),
    .DEPTH       (DEPTH),
    .N_PAR_WRITES(N_PAR_WRITES),
    .DATA_W      (CALC_DATA_W)
  ) u_cfb_buffer (
    .clk     (clk),
    .rst_n   (rst_n),
    .ev_in   ({ev_sub, ev_add}),
    .data_in (calc_data_t'{a: a, b: b}),
    .tail_ptr(cfb_tail_ptr),
    .rd_valid(rd_valid),
    .rd_type (rd_type),
    .rd_data (rd_data),
    .head_ptr(cfb_head_ptr),
    .overflow(cfb_overflow)
  );

  cfb_exu #(
    .N_TYPES(CALC_N_EVENTS),
    .DATA_W (CALC_DATA_W),
    .DEPTH  (DEPTH)
  ) u_cfb_exu (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_valid(rd_valid),
    .rd_type (rd_type),
    .rd_data (rd_data),
    .tail_ptr(cfb_tail_ptr),
    .ev_out  (fwd_ev),
    .data_out(fwd_data)
  );

  basic_calculator #(
    .FANIN       (1),
    .DEPTH       (DEPTH),
    .N_PAR_WRITES(N_PAR_WRITES)
  ) u_calculator (
    .clk     (clk),
    .rst_n   (rst_n),
    .ev_add  (fwd_ev[EV_ADD]),
    .ev_sub  (fwd_ev[EV_SUB]),
    .a       (fwd_data.a),
    .b       (fwd_data.b),
    .done    (done),
    .x       (x),
    .head_ptr(calc_head_ptr),
    .tail_ptr(calc_tail_ptr),
    .state   (calc_state),
    .overflow(calc_overflow)
  );

endmodule
