// acc_dma: the accelerator's DMA engine between its local storage and its
// port to the shared L3 cache.
//
// A command (cmd_valid/cmd_ready) names a direction, a byte address aligned
// to 8 bytes and a number of 64-bit words. A read issues one request per
// word, back to back as fast as mem_req_ready allows, and writes each
// returned word into local storage through lcl_wr_* with its index;
// responses come back in request order, so a second counter follows them.
// A write reads local storage combinationally at lcl_rd_idx and posts one
// write request per word. cmd_done pulses for one cycle when the last read
// word has arrived or the last write request has been accepted.
// The command format and the in-order, posted-write memory port are this
// design's choices: the framework only says that accelerators reach the L3
// through a DMA with a load port and a store port.
module acc_dma
  import acm_pkg::*;
#(
  parameter int unsigned IDX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  logic             cmd_write,
  input  logic [PTR_W-1:0] cmd_addr,
  input  logic [IDX_W:0]   cmd_words,
  output logic             cmd_done,
  // local storage
  output logic             lcl_wr_valid,
  output logic [IDX_W-1:0] lcl_wr_idx,
  output logic [63:0]      lcl_wr_data,
  output logic [IDX_W-1:0] lcl_rd_idx,
  input  logic [63:0]      lcl_rd_data,
  // L3 port
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic             mem_req_write,
  output logic [PTR_W-1:0] mem_req_addr,
  output logic [63:0]      mem_req_wdata,
  input  logic             mem_resp_valid,
  input  logic [63:0]      mem_resp_rdata
);

  logic             active_q, write_q;
  logic [PTR_W-1:0] addr_q;
  logic [IDX_W:0]   words_q, issued_q, returned_q;

  assign cmd_ready     = !active_q;
  assign mem_req_valid = active_q && (issued_q < words_q);
  assign mem_req_write = write_q;
  assign mem_req_addr  = addr_q + PTR_W'({issued_q, 3'b000});
  assign lcl_rd_idx    = issued_q[IDX_W-1:0];
  assign mem_req_wdata = lcl_rd_data;
  assign lcl_wr_valid  = active_q && !write_q && mem_resp_valid;
  assign lcl_wr_idx    = returned_q[IDX_W-1:0];
  assign lcl_wr_data   = mem_resp_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q   <= 1'b0;
      write_q    <= 1'b0;
      addr_q     <= '0;
      words_q    <= '0;
      issued_q   <= '0;
      returned_q <= '0;
      cmd_done   <= 1'b0;
    end else begin
      cmd_done <= 1'b0;
      if (!active_q) begin
        if (cmd_valid) begin
          active_q   <= (cmd_words != '0);
          cmd_done   <= (cmd_words == '0);
          write_q    <= cmd_write;
          addr_q     <= cmd_addr;
          words_q    <= cmd_words;
          issued_q   <= '0;
          returned_q <= '0;
        end
      end else begin
        if (mem_req_valid && mem_req_ready) begin
          issued_q <= issued_q + 1'b1;
          if (write_q && issued_q + 1'b1 == words_q) begin
            active_q <= 1'b0;
            cmd_done <= 1'b1;
          end
        end
        if (!write_q && mem_resp_valid) begin
          returned_q <= returned_q + 1'b1;
          if (returned_q + 1'b1 == words_q) begin
            active_q <= 1'b0;
            cmd_done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
