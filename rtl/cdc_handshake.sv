// cdc_handshake: clock-domain crossing for one data word, four-phase-free toggle protocol.
//
// The source side registers the word and flips a request toggle; a two-flop synchronizer
// carries the toggle to the destination, which presents the word (dst_valid) until it is
// taken (dst_ready) and then flips an acknowledge toggle that returns through another
// two-flop synchronizer. The source accepts a new word (src_ready) only after the
// acknowledge has come back, so the data bus is stable whenever the destination samples it.
// One word is in flight at a time; a round trip costs about two cycles of each clock.
// The protocol is this design's choice: the document states only that clock-domain crossing
// logic exists between the main clock and the engine clock.
module cdc_handshake #(
  parameter int unsigned W = 128
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic         src_valid,
  output logic         src_ready,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic         dst_valid,
  input  logic         dst_ready,
  output logic [W-1:0] dst_data
);
  logic         req_t, ack_t;
  logic [W-1:0] data_q;
  logic [1:0]   req_sync, ack_sync;

  // source domain
  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      req_t    <= 1'b0;
      data_q   <= '0;
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack_t};
      if (src_valid && src_ready) begin
        data_q <= src_data;
        req_t  <= ~req_t;
      end
    end
  end
  assign src_ready = (req_t == ack_sync[1]);

  // destination domain
  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      req_sync <= '0;
      ack_t    <= 1'b0;
    end else begin
      req_sync <= {req_sync[0], req_t};
      if (dst_valid && dst_ready) begin
        ack_t <= ~ack_t;
      end
    end
  end
  assign dst_valid = (req_sync[1] != ack_t);
  assign dst_data  = data_q;
endmodule
