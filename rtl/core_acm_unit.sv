// core_acm_unit: the core-side support of the accelerator ISA extension.
//
// The host pipeline hands over one decoded-to-this-unit instruction word
// with the register values it reads: rs1 holds accId; rs2 holds opId (EXEC)
// or the buffer's virtual address (TRANSFER); the register named by the rd
// field holds the buffer size for TRANSFER, which uses rd as a source.
// The unit checks accId against the accelerators present (IDs 0 to
// NUM_ACC-1) and signals an illegal instruction for any other value.
// Otherwise it builds the request ACM: the inst byte, accId, the procId of
// the running process (from a CSR, never from the user), the coreId for
// CHECK and ISBUSY, size and the TLB-translated physical pointer for
// TRANSFER, opId for EXEC. It sends the packets in order on the request
// channel. RESERVE, TRANSFER, EXEC and RELEASE commit once the last packet
// is accepted. CHECK and ISBUSY wait for the response ACM and then write its
// return value to rd.
//
// Interface: issue_valid/issue_ready accepts an instruction when the unit is
// idle (one instruction in flight). tlb_vaddr is driven with rs2 and
// tlb_paddr must return its translation in the same cycle. done pulses for
// one cycle when the instruction commits, together with illegal_insn or
// wb_valid/wb_rd/wb_data. Timing: the first packet is offered the cycle
// after issue, one packet per cycle while req_ready is high.
// The instruction encoding (custom-0 opcode, funct3 = 0, funct7 = inst code)
// is this design's choice; the operands and message contents follow the
// framework.
module core_acm_unit
  import acm_pkg::*;
#(
  parameter int unsigned NUM_ACC = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [COREID_W-1:0] core_id,
  input  logic [ACM_W-1:0]    proc_id,
  // instruction issue
  input  logic                issue_valid,
  output logic                issue_ready,
  input  logic [31:0]         instr,
  input  logic [XLEN-1:0]     rs1_val,
  input  logic [XLEN-1:0]     rs2_val,
  input  logic [XLEN-1:0]     rd_val,
  // address translation by the core's TLB
  output logic [XLEN-1:0]     tlb_vaddr,
  input  logic [PTR_W-1:0]    tlb_paddr,
  // commit
  output logic                done,
  output logic                illegal_insn,
  output logic                wb_valid,
  output logic [4:0]          wb_rd,
  output logic [XLEN-1:0]     wb_data,
  // request ACMs towards the NoC
  output logic                req_valid,
  input  logic                req_ready,
  output acm_flit_t           req_flit,
  // response ACMs from the NoC
  input  logic                resp_valid,
  output logic                resp_ready,
  input  acm_flit_t           resp_flit
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT} state_e;

  state_e             state_q;
  logic [ACM_W-1:0]   pkt_q [3];
  logic [1:0]         npkt_q, idx_q;
  logic               sync_q;
  logic [4:0]         rd_q;

  // decode
  acm_inst_e   dec_inst;
  logic        dec_ok;
  logic        acc_ok;
  always_comb begin
    dec_inst = acm_inst_e'(instr[31:25] + 7'd0);
    dec_ok   = (instr[6:0] == OPC_CUSTOM0) && (instr[14:12] == 3'b000) &&
               (instr[31:25] >= 7'd1) && (instr[31:25] <= 7'd6);
    acc_ok   = (rs1_val < XLEN'(NUM_ACC));
  end

  assign tlb_vaddr   = rs2_val;
  assign issue_ready = (state_q == S_IDLE);
  assign req_valid   = (state_q == S_SEND);
  assign req_flit    = '{data: pkt_q[idx_q], last: (idx_q == npkt_q - 2'd1)};
  assign resp_ready  = (state_q == S_WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      pkt_q        <= '{default: '0};
      npkt_q       <= 2'd2;
      idx_q        <= '0;
      sync_q       <= 1'b0;
      rd_q         <= '0;
      done         <= 1'b0;
      illegal_insn <= 1'b0;
      wb_valid     <= 1'b0;
      wb_rd        <= '0;
      wb_data      <= '0;
    end else begin
      done         <= 1'b0;
      illegal_insn <= 1'b0;
      wb_valid     <= 1'b0;
      unique case (state_q)
        S_IDLE: if (issue_valid) begin
          if (!dec_ok || !acc_ok) begin
            done         <= 1'b1;
            illegal_insn <= 1'b1;
          end else begin
            pkt_q[0] <= req_head(dec_inst, rs1_val[ACCID_W-1:0], core_id,
                                 rd_val[SIZE_W-1:0], rs2_val[OPID_W-1:0]);
            pkt_q[1] <= proc_id;
            pkt_q[2] <= tlb_paddr;
            npkt_q   <= 2'(req_packets(dec_inst));
            idx_q    <= '0;
            sync_q   <= inst_is_sync(dec_inst);
            rd_q     <= instr[11:7];
            state_q  <= S_SEND;
          end
        end
        S_SEND: if (req_ready) begin
          if (idx_q == npkt_q - 2'd1) begin
            if (sync_q) begin
              state_q <= S_WAIT;
            end else begin
              done    <= 1'b1;
              state_q <= S_IDLE;
            end
          end else begin
            idx_q <= idx_q + 2'd1;
          end
        end
        S_WAIT: if (resp_valid) begin
          done     <= 1'b1;
          wb_valid <= 1'b1;
          wb_rd    <= rd_q;
          wb_data  <= XLEN'(resp_ret(resp_flit.data));
          state_q  <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A message must not change while it waits for the NoC.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (req_valid && !req_ready) |=> (req_valid && $stable(req_flit));
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
