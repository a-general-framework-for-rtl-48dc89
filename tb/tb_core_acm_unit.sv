// tb_core_acm_unit: issues random accelerator instructions to the core-side
// unit (core 2, procId from a changing CSR value, four accelerators) and
// checks every request packet bit by bit against the message layout worked
// out here: inst byte in bits 63:56, accId in 7:0, coreId in 15:8 for
// CHECK/ISBUSY, size in 47:8 for TRANSFER, opId in 39:8 for EXEC, procId in
// packet 1 and the translated pointer in packet 2. CHECK/ISBUSY must wait
// for the response and write its value to rd; the others commit when sent.
// Unknown accIds and foreign encodings must raise illegal_insn and send
// nothing. The NoC side stalls at random.
module tb_core_acm_unit;
  import acm_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock
  logic [7:0] core_id = 8'd2;
  logic [63:0] proc_id;
  logic issue_valid, issue_ready, done, illegal_insn, wb_valid;
  logic [31:0] instr;
  logic [63:0] rs1_val, rs2_val, rd_val, tlb_vaddr, tlb_paddr, wb_data;
  logic [4:0] wb_rd;
  logic req_valid, req_ready, resp_valid, resp_ready;
  acm_flit_t req_flit, resp_flit;
  int checks = 0, failures = 0;
  int n_sync = 0, n_async = 0, n_illegal = 0;
  logic [64:0] got[$];   // {last, data}

  core_acm_unit #(.NUM_ACC(4)) dut (.*);

  // a TLB stand-in: physical = virtual with the upper bits flipped
  assign tlb_paddr = tlb_vaddr ^ 64'hFFFF_0000_0000_0000;

  always #5 clk = ~clk;
  always @(negedge clk) req_ready = ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && req_valid && req_ready) got.push_back({req_flit.last, req_flit.data});

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

  initial begin
    issue_valid = 0; instr = 0; rs1_val = 0; rs2_val = 0; rd_val = 0; proc_id = 0;
    resp_valid = 0; resp_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int code, acc;
      bit bad_enc, illegal;
      logic [4:0] rd;
      logic [63:0] exp[$];
      logic [31:0] ret;
      int cyc;
      exp.delete();
      code    = 1 + $urandom % 6;
      acc     = (($urandom % 8) == 0) ? 4 + $urandom % 300 : $urandom % 4;
      bad_enc = ($urandom % 16) == 0;
      rd      = 5'($urandom);
      illegal = bad_enc || acc >= 4;
      @(negedge clk);
      proc_id = {32'($urandom), 32'($urandom)};
      rs1_val = 64'(acc);
      rs2_val = {32'($urandom), 32'($urandom)};
      rd_val  = {32'($urandom), 32'($urandom)};
      instr   = {7'(code), 5'($urandom), 5'($urandom), 3'b000, rd, 7'b0001011};
      if (bad_enc) instr[6:0] = 7'b0110011;
      if (!illegal) begin
        logic [63:0] p0;
        p0 = '0;
        p0[63:56] = 8'(code);
        p0[7:0]   = 8'(acc);
        if (code == 2 || code == 5) p0[15:8] = 8'd2;
        if (code == 3) p0[47:8] = rd_val[39:0];
        if (code == 4) p0[39:8] = rs2_val[31:0];
        exp.push_back(p0);
        exp.push_back(proc_id);
        if (code == 3) exp.push_back(rs2_val ^ 64'hFFFF_0000_0000_0000);
      end
      issue_valid = 1;
      #1 check("issue ready", issue_ready);
      @(negedge clk);
      issue_valid = 0;
      proc_id = '1;   // the CSR value must have been captured at issue
      rs2_val = '0;
      cyc = 0;
      if (code == 2 || code == 5) begin
        // answer after the request has gone out
        while (got.size() < exp.size() && cyc < 200) begin @(negedge clk); cyc++; end
        ret = $urandom;
        resp_flit = '{data: {8'(code), 8'h0, ret, 8'd2, 8'(acc)}, last: 1'b1};
        if (!illegal) begin
          repeat ($urandom % 5) @(negedge clk);
          check("not committed before response", !done);
          resp_valid = 1;
          #1 check("resp ready while waiting", resp_ready);
          @(negedge clk);
          resp_valid = 0;
        end
      end
      while (!done && cyc < 200) begin @(negedge clk); cyc++; end
      check("committed", done);
      check("illegal flag", illegal_insn == illegal);
      if (illegal) n_illegal++;
      else if (code == 2 || code == 5) begin
        n_sync++;
        check("writeback", wb_valid && wb_rd == rd && wb_data == 64'(ret));
      end else begin
        n_async++;
        check("no writeback", !wb_valid);
      end
      @(negedge clk);
      check("packet count", got.size() == exp.size());
      for (int i = 0; i < exp.size() && i < got.size(); i++) begin
        check($sformatf("packet %0d of inst %0d", i, code), got[i][63:0] == exp[i]);
        check("last flag", got[i][64] == (i == exp.size() - 1));
      end
      got.delete();
    end
    check("mix", n_sync > 0 && n_async > 0 && n_illegal > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
