// cfb_exu: Execution Unit of a composite function block (CFB).
//
// A CFB contains other FBs. To keep every simultaneous or fanned-in event, the
// CFB has its own input ring buffer, and its ExU passes the buffered events on
// to the inner FB one at a time. On each rising clock edge, if the buffer is
// not empty, the ExU takes the entry at the tail, advances the tail pointer
// (wrapping after slot DEPTH-1), raises the output event wire of that entry's
// type for exactly one cycle and drives the entry's stored data on data_out.
// With an empty buffer all output event wires are low and data_out holds its
// last value. The inner FB's buffer samples these outputs on the next falling
// edge, so passing through a CFB adds one clock cycle to an event's path.
//
// Interface: rd_valid / rd_type / rd_data / tail_ptr to the CFB buffer;
// ev_out (one wire per event type, in type order) and data_out to the inner FB.
// Forwarding one event per cycle and the one-cycle delay follow the source
// design; the registered outputs and reset to all-zero are choices made here.
module cfb_exu #(
  parameter int unsigned N_TYPES = 2,   // event types passed through
  parameter int unsigned DATA_W  = 32,  // width of the stored data
  parameter int unsigned DEPTH   = 4,   // slots of the CFB ring buffer
  localparam int unsigned PTR_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned TYPE_W = (N_TYPES > 1) ? $clog2(N_TYPES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_valid,
  input  logic [TYPE_W-1:0] rd_type,
  input  logic [DATA_W-1:0] rd_data,
  output logic [PTR_W-1:0]  tail_ptr,
  output logic [N_TYPES-1:0] ev_out,
  output logic [DATA_W-1:0] data_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail_ptr <= '0;
      ev_out   <= '0;
      data_out <= '0;
    end else if (rd_valid) begin
      tail_ptr <= (tail_ptr == PTR_W'(DEPTH - 1)) ? '0 : tail_ptr + PTR_W'(1);
      ev_out   <= N_TYPES'(1) << rd_type;
      data_out <= rd_data;
    end else begin
      ev_out   <= '0;
    end
  end

  // At most one event is forwarded per cycle
  a_one_event: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ev_out));

endmodule
