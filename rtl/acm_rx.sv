// acm_rx: request-ACM receiver of one accelerator (the comparator and the
// message buffer in front of the control unit).
//
// It watches the broadcast request channel of the NoC and assembles each
// message from its packets: packet 0 gives inst, accId and the
// instruction-specific field (coreId, size or opId), packet 1 the procId,
// packet 2 (TRANSFER only) the physical pointer. The comparator checks the
// accId of packet 0 against ACC_ID; messages for other accelerators are
// consumed and dropped. A matching message is presented on msg_valid/msg
// and held until msg_ready; meanwhile the receiver stops accepting packets,
// so the NoC waits. Field positions follow acm_pkg.
// The comparator on accId follows the framework; framing by the last flag
// and the hold-until-taken buffer are this design's choices. Timing: a
// message is valid the cycle after its last packet is accepted.
module acm_rx
  import acm_pkg::*;
#(
  parameter logic [ACCID_W-1:0] ACC_ID = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  acm_flit_t in_flit,
  output logic      msg_valid,
  input  logic      msg_ready,
  output acm_msg_t  msg
);

  logic [1:0] idx_q;
  acm_msg_t   buf_q;
  logic       valid_q;

  assign in_ready  = !valid_q;
  assign msg_valid = valid_q;
  assign msg       = buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q   <= '0;
      buf_q   <= '0;
      valid_q <= 1'b0;
    end else begin
      if (valid_q && msg_ready) valid_q <= 1'b0;
      if (in_valid && in_ready) begin
        unique case (idx_q)
          2'd0: begin
            buf_q.inst    <= acm_inst_e'(in_flit.data[63:56]);
            buf_q.acc_id  <= in_flit.data[7:0];
            buf_q.core_id <= in_flit.data[15:8];
            buf_q.size    <= in_flit.data[47:8];
            buf_q.op_id   <= in_flit.data[39:8];
          end
          2'd1:    buf_q.proc_id <= in_flit.data;
          default: buf_q.pptr    <= in_flit.data;
        endcase
        if (in_flit.last) begin
          idx_q <= '0;
          // comparator: keep only messages addressed to this accelerator
          if (((idx_q == 2'd0) ? in_flit.data[7:0] : buf_q.acc_id) == ACC_ID)
            valid_q <= 1'b1;
        end else begin
          idx_q <= (idx_q == 2'd3) ? idx_q : idx_q + 2'd1;
        end
      end
    end
  end

endmodule
