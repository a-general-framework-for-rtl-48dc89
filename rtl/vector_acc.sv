// vector_acc: a vector accelerator datapath driven by acc_manager.
//
// Three buffers are set up by TRANSFER: buffer 0 and buffer 1 are the
// source vectors A and B, buffer 2 the destination. Sizes are in bytes and
// elements are 64-bit signed integers, so A holds size0/8 elements. On start
// the descriptors and opId are copied and the vector is processed in strips
// of LANES elements (strip mining) by a three-stage pipeline:
//   load    reads the A strip and then the B strip through its own DMA on
//           the L3 load port into one of two input slots;
//   execute waits for a full input slot, spends the operation's latency,
//           then writes all lanes into one of two result slots;
//   store   writes a full result slot through a second DMA on the L3 store
//           port.
// The two slots of each kind let strip i+1 load while strip i executes and
// strip i-1 is stored. The opId drives the operation multiplexer after the
// ALU lanes:
//   0 add, 1 sub, 2 mul, 3 div, 4 min, 5 max  -> element-wise, dst[i]
//   6 dot-product, 7 reduce-sum of A         -> one word, dst[0]
// The execute step of a strip lasts the operation's latency (add 2, sub 2,
// mul 5, div 14, min 4, max 4 cycles; dot-product uses the mul latency and
// reduce-sum the add latency); ex_busy_q is high for exactly those cycles.
// Dot-product and reduce-sum accumulate across strips and store one word
// after the last strip. Reduce-sum loads no B strip; it takes two buffers
// (A, destination in buffer 1) and may start after two TRANSFERs: op_bufs
// answers the manager's op_query combinationally. Division by zero gives
// all ones and the overflowing quotient gives the dividend, as in RISC-V.
// done pulses for one cycle after the last store has been accepted.
// Source and destination areas must be equal or disjoint: a destination
// overlapping a source at an offset may be written before later strips of
// that source are loaded.
// The operation list, the latencies, the separate load and store ports and
// the load-execute-store strip pipeline follow the framework's vector
// accelerator; integer instead of floating-point elements, the two-slot
// buffering and the opId numbering are this design's choices.
module vector_acc
  import acm_pkg::*;
#(
  parameter int unsigned LANES = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the manager
  input  logic              start,
  input  logic [OPID_W-1:0] start_op,
  input  buf_desc_t         bufs [3],
  output logic              done,
  // buffers needed by an operation (for the manager's EXEC check)
  input  logic [OPID_W-1:0] op_query,
  output logic [1:0]        op_bufs,
  // L3 load port
  output logic              ld_req_valid,
  input  logic              ld_req_ready,
  output logic [PTR_W-1:0]  ld_req_addr,
  input  logic              ld_resp_valid,
  input  logic [63:0]       ld_resp_rdata,
  // L3 store port
  output logic              st_req_valid,
  input  logic              st_req_ready,
  output logic [PTR_W-1:0]  st_req_addr,
  output logic [63:0]       st_req_wdata
);

  localparam int unsigned IW = (LANES > 1) ? $clog2(LANES) : 1;

  typedef enum logic [3:0] {
    OP_ADD = 4'd0, OP_SUB = 4'd1, OP_MUL = 4'd2, OP_DIV = 4'd3,
    OP_MIN = 4'd4, OP_MAX = 4'd5, OP_DOT = 4'd6, OP_RSUM = 4'd7
  } vop_e;

  // reduce-sum has one source: A in buffer 0, result in buffer 1
  assign op_bufs = (op_query == OPID_W'(OP_RSUM)) ? 2'd2 : 2'd3;

  // ---------------- operation registers ----------------
  logic               run_q;
  vop_e               op_q;
  buf_desc_t          src_a_q, src_b_q, dst_q;
  logic [SIZE_W-1:0]  n_q;
  logic               reduce;
  assign reduce = (op_q == OP_DOT) || (op_q == OP_RSUM);

  // elements in the strip that starts at element pos
  function automatic logic [IW:0] strip_w(logic [SIZE_W-1:0] n, logic [SIZE_W-1:0] pos);
    return ((n - pos) < SIZE_W'(LANES)) ? (IW+1)'(n - pos) : (IW+1)'(LANES);
  endfunction

  // ---------------- slots ----------------
  logic signed [63:0] a_buf [2][LANES];
  logic signed [63:0] b_buf [2][LANES];
  logic signed [63:0] r_buf [2][LANES];
  logic [1:0]         ab_full_q, r_full_q;

  // ---------------- load stage ----------------
  logic [SIZE_W-1:0] ld_pos_q;
  logic              ld_slot_q, ld_phase_q, ld_issued_q;   // phase 0: A, 1: B
  logic              ld_active;
  logic              ldma_cmd_ready, ldma_done;
  logic              ldma_wr_valid;
  logic [IW-1:0]     ldma_wr_idx, ldma_rd_idx_unused;
  logic [63:0]       ldma_wr_data;
  logic              ld_write_unused;
  logic [63:0]       ld_wdata_unused;

  assign ld_active = run_q && (ld_pos_q != n_q) && !ab_full_q[ld_slot_q];

  acc_dma #(.IDX_W(IW)) u_load_dma (
    .clk, .rst_n,
    .cmd_valid   (ld_active && !ld_issued_q),
    .cmd_ready   (ldma_cmd_ready),
    .cmd_write   (1'b0),
    .cmd_addr    ((ld_phase_q ? src_b_q.pptr : src_a_q.pptr) + PTR_W'({ld_pos_q, 3'b000})),
    .cmd_words   (strip_w(n_q, ld_pos_q)),
    .cmd_done    (ldma_done),
    .lcl_wr_valid(ldma_wr_valid),
    .lcl_wr_idx  (ldma_wr_idx),
    .lcl_wr_data (ldma_wr_data),
    .lcl_rd_idx  (ldma_rd_idx_unused),
    .lcl_rd_data (64'd0),
    .mem_req_valid (ld_req_valid),
    .mem_req_ready (ld_req_ready),
    .mem_req_write (ld_write_unused),
    .mem_req_addr  (ld_req_addr),
    .mem_req_wdata (ld_wdata_unused),
    .mem_resp_valid(ld_resp_valid),
    .mem_resp_rdata(ld_resp_rdata)
  );

  // ---------------- execute stage ----------------
  logic [SIZE_W-1:0]  ex_pos_q;
  logic               ex_slot_q, ex_busy_q;
  logic [4:0]         ex_lat_q;
  logic signed [63:0] acc_q;
  logic               ex_go;

  assign ex_go = run_q && !ex_busy_q && (ex_pos_q != n_q) && ab_full_q[ex_slot_q] &&
                 (reduce || !r_full_q[ex_slot_q]);

  function automatic logic signed [63:0] alu(vop_e op, logic signed [63:0] a,
                                             logic signed [63:0] b);
    unique case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_MUL, OP_DOT: return a * b;
      OP_DIV: begin
        if (b == 0) return '1;
        if (a == {1'b1, 63'd0} && b == -64'sd1) return a;
        return a / b;
      end
      OP_RSUM: return a;
      OP_MIN: return (a < b) ? a : b;
      OP_MAX: return (a > b) ? a : b;
      default: return '0;
    endcase
  endfunction

  function automatic logic [4:0] op_latency(vop_e op);
    unique case (op)
      OP_ADD, OP_SUB, OP_RSUM: return 5'd2;
      OP_MUL, OP_DOT:          return 5'd5;
      OP_DIV:                  return 5'd14;
      default:                 return 5'd4;
    endcase
  endfunction

  logic signed [63:0] lane_res [LANES];
  logic signed [63:0] strip_sum;
  logic [IW:0]        ex_w;
  assign ex_w = strip_w(n_q, ex_pos_q);
  always_comb begin
    strip_sum = '0;
    for (int unsigned l = 0; l < LANES; l++) begin
      lane_res[l] = alu(op_q, a_buf[ex_slot_q][l], b_buf[ex_slot_q][l]);
      if ((IW+1)'(l) < ex_w) strip_sum += lane_res[l];
    end
  end

  // ---------------- store stage ----------------
  logic [SIZE_W-1:0] st_pos_q;
  logic              st_slot_q, st_issued_q, red_stored_q;
  logic              st_active, st_red;
  logic              sdma_cmd_ready, sdma_done;
  logic              sdma_wr_valid_unused;
  logic [IW-1:0]     sdma_wr_idx_unused, sdma_rd_idx;
  logic [63:0]       sdma_wr_data_unused;
  logic              st_write_unused;

  // element-wise: one store per strip; reductions: one word at the end
  assign st_red    = run_q && reduce && (ex_pos_q == n_q) && !ex_busy_q && !red_stored_q;
  assign st_active = st_red ||
                     (run_q && !reduce && (st_pos_q != n_q) && r_full_q[st_slot_q]);

  acc_dma #(.IDX_W(IW)) u_store_dma (
    .clk, .rst_n,
    .cmd_valid   (st_active && !st_issued_q),
    .cmd_ready   (sdma_cmd_ready),
    .cmd_write   (1'b1),
    .cmd_addr    (reduce ? dst_q.pptr : dst_q.pptr + PTR_W'({st_pos_q, 3'b000})),
    .cmd_words   (reduce ? (IW+1)'(1) : strip_w(n_q, st_pos_q)),
    .cmd_done    (sdma_done),
    .lcl_wr_valid(sdma_wr_valid_unused),
    .lcl_wr_idx  (sdma_wr_idx_unused),
    .lcl_wr_data (sdma_wr_data_unused),
    .lcl_rd_idx  (sdma_rd_idx),
    .lcl_rd_data (reduce ? acc_q : r_buf[st_slot_q][sdma_rd_idx]),
    .mem_req_valid (st_req_valid),
    .mem_req_ready (st_req_ready),
    .mem_req_write (st_write_unused),
    .mem_req_addr  (st_req_addr),
    .mem_req_wdata (st_req_wdata),
    .mem_resp_valid(1'b0),
    .mem_resp_rdata(64'd0)
  );

  // ---------------- control ----------------
  logic finished;
  assign finished = run_q && (reduce ? red_stored_q : (st_pos_q == n_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q        <= 1'b0;
      op_q         <= OP_ADD;
      src_a_q      <= '0;
      src_b_q      <= '0;
      dst_q        <= '0;
      n_q          <= '0;
      ab_full_q    <= '0;
      r_full_q     <= '0;
      ld_pos_q     <= '0;
      ld_slot_q    <= 1'b0;
      ld_phase_q   <= 1'b0;
      ld_issued_q  <= 1'b0;
      ex_pos_q     <= '0;
      ex_slot_q    <= 1'b0;
      ex_busy_q    <= 1'b0;
      ex_lat_q     <= '0;
      acc_q        <= '0;
      st_pos_q     <= '0;
      st_slot_q    <= 1'b0;
      st_issued_q  <= 1'b0;
      red_stored_q <= 1'b0;
      done         <= 1'b0;
      for (int unsigned s = 0; s < 2; s++)
        for (int unsigned l = 0; l < LANES; l++) begin
          a_buf[s][l] <= '0;
          b_buf[s][l] <= '0;
          r_buf[s][l] <= '0;
        end
    end else begin
      done <= 1'b0;

      if (!run_q) begin
        if (start) begin
          run_q        <= 1'b1;
          op_q         <= vop_e'(start_op[3:0]);
          src_a_q      <= bufs[0];
          src_b_q      <= bufs[1];
          dst_q        <= (start_op[3:0] == OP_RSUM) ? bufs[1] : bufs[2];
          n_q          <= bufs[0].size >> 3;
          ab_full_q    <= '0;
          r_full_q     <= '0;
          ld_pos_q     <= '0;
          ld_slot_q    <= 1'b0;
          ld_phase_q   <= 1'b0;
          ld_issued_q  <= 1'b0;
          ex_pos_q     <= '0;
          ex_slot_q    <= 1'b0;
          ex_busy_q    <= 1'b0;
          acc_q        <= '0;
          st_pos_q     <= '0;
          st_slot_q    <= 1'b0;
          st_issued_q  <= 1'b0;
          red_stored_q <= 1'b0;
        end
      end else begin
        // load stage
        if (ldma_wr_valid) begin
          if (!ld_phase_q) a_buf[ld_slot_q][ldma_wr_idx] <= ldma_wr_data;
          else             b_buf[ld_slot_q][ldma_wr_idx] <= ldma_wr_data;
        end
        if (ld_active && !ld_issued_q && ldma_cmd_ready) ld_issued_q <= 1'b1;
        if (ldma_done) begin
          ld_issued_q <= 1'b0;
          if (!ld_phase_q && op_q != OP_RSUM) begin
            ld_phase_q <= 1'b1;
          end else begin
            ld_phase_q           <= 1'b0;
            ab_full_q[ld_slot_q] <= 1'b1;
            ld_slot_q            <= !ld_slot_q;
            ld_pos_q             <= ld_pos_q + SIZE_W'(strip_w(n_q, ld_pos_q));
          end
        end

        // execute stage
        if (ex_go) begin
          ex_busy_q <= 1'b1;
          ex_lat_q  <= op_latency(op_q) - 5'd1;
        end else if (ex_busy_q) begin
          if (ex_lat_q != '0) begin
            ex_lat_q <= ex_lat_q - 5'd1;
          end else begin
            ex_busy_q            <= 1'b0;
            ab_full_q[ex_slot_q] <= 1'b0;
            ex_slot_q            <= !ex_slot_q;
            ex_pos_q             <= ex_pos_q + SIZE_W'(ex_w);
            if (reduce) begin
              acc_q <= acc_q + strip_sum;
            end else begin
              for (int unsigned l = 0; l < LANES; l++) r_buf[ex_slot_q][l] <= lane_res[l];
              r_full_q[ex_slot_q] <= 1'b1;
            end
          end
        end

        // store stage
        if (st_active && !st_issued_q && sdma_cmd_ready) st_issued_q <= 1'b1;
        if (sdma_done) begin
          st_issued_q <= 1'b0;
          if (reduce) begin
            red_stored_q <= 1'b1;
          end else begin
            r_full_q[st_slot_q] <= 1'b0;
            st_slot_q           <= !st_slot_q;
            st_pos_q            <= st_pos_q + SIZE_W'(strip_w(n_q, st_pos_q));
          end
        end

        if (finished) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

endmodule
