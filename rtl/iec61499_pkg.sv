// Shared types and constants for the IEC 61499 function-block hardware.
//
// An IEC 61499 event is a one-clock-cycle pulse on a single-bit wire; data
// inputs and outputs of the sample calculator are of the IEC type INT, which
// is a 16-bit signed integer. The calculator has two input event types, ADD and
// SUB, in that order: when both arrive in the same clock tick the ring buffer
// stores ADD first. Its Execution Control Chart (ECC) has the states RDY, ADD
// and SUB. The data record below is what the ring buffer stores next to every
// event of the calculator: the values of the inputs a and b at the time of the
// event.
package iec61499_pkg;

  // IEC 61131-3 INT: 16-bit two's complement
  localparam int unsigned INT_W = 16;
  typedef logic signed [INT_W-1:0] int_t;

  // Input events of the BasicCalculator, in buffer input order
  localparam int unsigned CALC_N_EVENTS = 2;
  typedef enum logic [0:0] {
    EV_ADD = 1'b0,
    EV_SUB = 1'b1
  } calc_event_e;

  // ECC states of the BasicCalculator
  typedef enum logic [1:0] {
    ST_RDY = 2'd0,
    ST_ADD = 2'd1,
    ST_SUB = 2'd2
  } calc_state_e;

  // Input data record stored with each calculator event
  typedef struct packed {
    int_t a;
    int_t b;
  } calc_data_t;

  localparam int unsigned CALC_DATA_W = $bits(calc_data_t);

  // Which data inputs each event carries (WITH association): bit 1 = a, bit 0 = b.
  // Both ADD and SUB are associated with a and b.
  localparam logic [1:0] CALC_WITH_ADD = 2'b11;
  localparam logic [1:0] CALC_WITH_SUB = 2'b11;

  // Default wire-to-event-type map of an event ring buffer: wires are grouped
  // by type, FANIN wires per type, so wire i carries type i / FANIN. Entry i of
  // the result (8 bits each) is the type of wire i; a buffer keeps the low
  // entries it needs.
  localparam int unsigned MAX_EVENT_WIRES = 64;
  typedef logic [MAX_EVENT_WIRES-1:0][7:0] wire_type_map_t;

  function automatic wire_type_map_t uniform_wire_map(input int unsigned fanin);
    wire_type_map_t m;
    for (int unsigned i = 0; i < MAX_EVENT_WIRES; i++) m[i] = 8'(i / fanin);
    return m;
  endfunction

endpackage
