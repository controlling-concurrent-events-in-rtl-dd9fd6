// calc_exu: Execution Unit (ExU) of the BasicCalculator basic function block.
//
// The ExU merges the Event Execution Control and the algorithms of the FB. It
// consumes the calculator's ring buffer: it owns the tail pointer, sees the
// entry at the tail combinationally (rd_valid, rd_type, rd_data) and, on every
// rising clock edge, does the whole execution step at once:
//   1. load the data state kept from the previous cycle (a, b);
//   2. if the buffer is not empty, take the event at the tail and advance the
//      tail pointer (wrapping after slot DEPTH-1);
//   3. overwrite the data inputs that are associated with the event (WITH);
//   4. run the Execution Control Chart and the algorithm of the new state;
//   5. keep the data state for the next cycle;
//   6. register the outputs: DONE pulses for one cycle per executed event, x
//      holds the last result.
// ECC: RDY --SUB--> SUB (priority 1), RDY --ADD--> ADD (priority 2), and
// ADD/SUB --1--> RDY. The ADD state runs x = a + b, the SUB state x = a - b;
// both emit DONE with x. The unconditional return to RDY and the next event's
// transition out of RDY are taken in the same clock edge, so back-to-back
// events execute one per cycle and DONE stays high for as many cycles as events
// were executed. With no event the state returns to (or stays in) RDY and DONE
// is low. Latency: an event written by the buffer on a falling edge is executed
// on the next rising edge, half a cycle later.
//
// From the source design: the step order, the tail pointer ownership, the
// ECC, the algorithms and the WITH-based data update. Own choices: INT (16-bit)
// wrap-around arithmetic, active-low asynchronous reset to RDY with a = b = x = 0,
// and chaining the "1" transition with the next event in one edge.
module calc_exu
  import iec61499_pkg::*;
#(
  parameter int unsigned DEPTH = 4,   // slots of the ring buffer being consumed
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // ring buffer read side
  input  logic             rd_valid,
  input  calc_event_e      rd_type,
  input  calc_data_t       rd_data,
  output logic [PTR_W-1:0] tail_ptr,
  // FB outputs
  output logic             done,
  output int_t             x,
  // observation
  output calc_state_e      state
);

  calc_state_e      state_d, state_rest;
  calc_data_t       data_q, data_d;
  logic [PTR_W-1:0] tail_d;
  logic             done_d;
  int_t             x_d;
  logic [1:0]       with_mask;

  always_comb begin
    // unconditional transitions ("1") of the algorithm states back to RDY
    unique case (state)
      ST_ADD, ST_SUB: state_rest = ST_RDY;
      default:        state_rest = state;
    endcase

    data_d  = data_q;
    state_d = state_rest;
    tail_d  = tail_ptr;
    done_d  = 1'b0;
    x_d     = x;
    with_mask = (rd_type == EV_ADD) ? CALC_WITH_ADD : CALC_WITH_SUB;

    if (rd_valid) begin
      tail_d = (tail_ptr == PTR_W'(DEPTH - 1)) ? '0 : tail_ptr + PTR_W'(1);
      // overload only the data associated with the event
      if (with_mask[1]) data_d.a = rd_data.a;
      if (with_mask[0]) data_d.b = rd_data.b;
      if (state_rest == ST_RDY) begin
        if (rd_type == EV_SUB)      state_d = ST_SUB;   // priority 1
        else if (rd_type == EV_ADD) state_d = ST_ADD;   // priority 2
      end
      unique case (state_d)
        ST_ADD: begin x_d = data_d.a + data_d.b; done_d = 1'b1; end
        ST_SUB: begin x_d = data_d.a - data_d.b; done_d = 1'b1; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_RDY;
      data_q   <= '0;
      tail_ptr <= '0;
      done     <= 1'b0;
      x        <= '0;
    end else begin
      state    <= state_d;
      data_q   <= data_d;
      tail_ptr <= tail_d;
      done     <= done_d;
      x        <= x_d;
    end
  end

  // DONE is only raised by an algorithm state
  a_done_in_alg_state: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (state == ST_ADD || state == ST_SUB));

endmodule
