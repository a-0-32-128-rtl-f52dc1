// cdc_count_sync: carries a multi-bit counter value from one clock domain to
// another with a toggle handshake. The source captures its counter into a
// holding register and toggles `req`; the destination sees the toggle through
// a two-flop synchronizer, takes the (by then stable) holding register and
// toggles `ack` back; when the source sees the acknowledge it captures the
// next value. The destination therefore sees an older copy of a monotonically
// advancing counter, never a torn one, which is what FIFO pointer and credit
// comparisons need. Update interval: about 3 destination plus 3 source cycles.
module cdc_count_sync #(
  parameter int unsigned W = 11
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_val,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_val
);
  logic [W-1:0] hold;
  logic         req, ack_s1, ack_s2;
  logic         req_s1, req_s2, req_seen, ack;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold   <= '0;
      req    <= 1'b0;
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= ack;
      ack_s2 <= ack_s1;
      if (ack_s2 == req) begin
        hold <= src_val;
        req  <= ~req;
      end
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      req_s1   <= 1'b0;
      req_s2   <= 1'b0;
      req_seen <= 1'b0;
      ack      <= 1'b0;
      dst_val  <= '0;
    end else begin
      req_s1 <= req;
      req_s2 <= req_s1;
      if (req_s2 != req_seen) begin
        req_seen <= req_s2;
        dst_val  <= hold;
        ack      <= req_s2;
      end
    end
  end
endmodule
