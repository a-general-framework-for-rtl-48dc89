// tb_acc_dma: writes random strips from a local buffer to the L3 model at
// random aligned addresses, reads them back into a second local buffer and
// compares; also checks the memory contents directly, that a zero-word
// command completes at once, and that a full read strip completes within
// words + latency + 3 cycles when the port never stalls.
module tb_acc_dma;
  import acm_pkg::*;
  localparam int unsigned IDX_W = 4;
  localparam int unsigned NW    = 1 << IDX_W;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock
  logic cmd_valid, cmd_ready, cmd_write, cmd_done;
  logic [63:0] cmd_addr;
  logic [IDX_W:0] cmd_words;
  logic lcl_wr_valid;
  logic [IDX_W-1:0] lcl_wr_idx, lcl_rd_idx;
  logic [63:0] lcl_wr_data, lcl_rd_data;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_resp_valid;
  logic [63:0] mem_req_addr, mem_req_wdata, mem_resp_rdata;
  logic st_ready_unused;
  logic stall_en;
  int checks = 0, failures = 0;
  logic [63:0] src [NW];
  logic [63:0] dst [NW];

  acc_dma #(.IDX_W(IDX_W)) dut (.*);

  l3_mem_model #(.WORDS(1024), .LATENCY(6)) u_mem (
    .clk, .stall_en, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_write(mem_req_write),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata),
    .st_valid(1'b0), .st_ready(st_ready_unused), .st_addr(64'd0), .st_wdata(64'd0));

  assign lcl_rd_data = src[lcl_rd_idx];
  always @(posedge clk) if (lcl_wr_valid) dst[lcl_wr_idx] <= lcl_wr_data;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(logic wr, logic [63:0] addr, int words, output int cycles);
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_addr = addr; cmd_words = (IDX_W+1)'(words);
    @(negedge clk);
    cmd_valid = 0;
    cycles = 1;
    while (!cmd_done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    cmd_valid = 0; cmd_write = 0; cmd_addr = 0; cmd_words = 0; stall_en = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int w;
      logic [63:0] a;
      w = 1 + $urandom % NW;
      a = 64'(($urandom % 900) * 8);
      foreach (src[i]) src[i] = {32'($urandom), 32'($urandom)};
      foreach (dst[i]) dst[i] = '0;
      stall_en = (n % 2) == 0;
      run(1'b1, a, w, cyc);
      repeat (2) @(negedge clk);
      for (int i = 0; i < w; i++) check("mem contents", u_mem.mem[(a >> 3) + i] == src[i]);
      run(1'b0, a, w, cyc);
      if (!stall_en) check("read strip time", cyc <= w + 6 + 3);
      for (int i = 0; i < w; i++) check("read back", dst[i] == src[i]);
    end
    run(1'b0, 64'h40, 0, cyc);
    check("zero-word command", cyc <= 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
