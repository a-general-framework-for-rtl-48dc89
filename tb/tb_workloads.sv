// tb_workloads: the two vector-accelerator benchmarks run as user programs
// on the complete fabric at its default size (four cores, four
// accelerators, 16-cycle NoC, 16 lanes, L3 model with 36-cycle latency).
//
//   dot-product (core 0, procId 100): RESERVE, CHECK, three TRANSFERs,
//     EXEC dot, ISBUSY polling, for vectors of 128, 1K, 8K, 64K and 512K
//     elements (the sizes of the benchmark series), then RELEASE.
//   pathfinder (core 1, procId 200): the dynamic-programming grid walk
//     next[i] = wall[r][i] + min(prev[i-1], prev[i], prev[i+1]) on a
//     6 x 100 grid. Each row is three vector operations: min of prev
//     shifted by -1 and 0, min with prev shifted by +1, add of the wall
//     row. The shifts are buffer pointers one element apart; prev buffers
//     carry one guard word of a large value at each end. Core 1 asks for
//     the accelerator while core 0 holds it and waits (CHECK polling) for
//     the hand-over.
//
// Results are compared with values computed here. For every dot-product
// the cycles spent in the execute step must be the number of 16-element
// strips times 5. The interface overhead (issue of RESERVE to issue of
// EXEC) and the total time per size are printed.
module tb_workloads;
  import acm_pkg::*;
  localparam int unsigned NC = 4, NA = 4;
  localparam logic [63:0] VBASE = 64'h0000_5000_0000_0000;  // virtual = physical + VBASE
  localparam int unsigned LANES = 16;
  // word addresses
  localparam int DA = 0, DB = 524288, DD = 1048576;
  localparam int PW = 1048704, PA = 1049344, PB = 1049472, PT = 1049600;
  localparam int ROWS = 6, COLS = 100;
  localparam longint BIG = 64'sh3FFF_FFFF_FFFF_FFFF;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock
  logic [63:0] proc_id [NC];
  logic        issue_valid [NC], issue_ready [NC];
  logic [31:0] instr [NC];
  logic [63:0] rs1_val [NC], rs2_val [NC], rd_val [NC], tlb_vaddr [NC], tlb_paddr [NC];
  logic        done [NC], illegal_insn [NC], wb_valid [NC];
  logic [4:0]  wb_rd [NC];
  logic [63:0] wb_data [NC];
  logic ld_req_valid, ld_req_ready, ld_resp_valid, st_req_valid, st_req_ready;
  logic [63:0] ld_req_addr, ld_resp_rdata, st_req_addr, st_req_wdata;
  logic              ext_start [NA-1];
  logic [OPID_W-1:0] ext_op    [NA-1];
  buf_desc_t         ext_bufs  [NA-1][3];
  logic              ext_done  [NA-1];
  logic              acc_busy  [NA];
  logic [1:0]        acc_state [NA];
  logic stall_en = 0;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  int exec_cycles = 0;

  acc_system dut (.*);

  l3_mem_model #(.WORDS(1049728), .LATENCY(36)) u_mem (
    .clk, .stall_en, .req_valid(ld_req_valid), .req_ready(ld_req_ready),
    .req_write(1'b0), .req_addr(ld_req_addr), .req_wdata(64'd0),
    .resp_valid(ld_resp_valid), .resp_rdata(ld_resp_rdata),
    .st_valid(st_req_valid), .st_ready(st_req_ready), .st_addr(st_req_addr), .st_wdata(st_req_wdata));

  for (genvar c = 0; c < NC; c++) begin : g_tlb
    assign tlb_paddr[c] = tlb_vaddr[c] - VBASE;
  end
  for (genvar a = 0; a < NA - 1; a++) begin : g_ext
    assign ext_done[a] = 1'b0;   // the other accelerators stay unused
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (dut.g_acc[0].g_vector.u_vec.ex_busy_q) exec_cycles++;   // execute step
  end

  initial begin
    repeat (5000000) @(posedge clk);
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

  // one accelerator instruction on core c; returns the rd value
  task automatic run(int c, int code, logic [63:0] rs1, logic [63:0] rs2, logic [63:0] rdv,
                     output logic [63:0] ret);
    @(negedge clk);
    while (!issue_ready[c]) @(negedge clk);
    instr[c]   = {7'(code), 5'd11, 5'd10, 3'b000, 5'd12, 7'b0001011};
    rs1_val[c] = rs1; rs2_val[c] = rs2; rd_val[c] = rdv;
    issue_valid[c] = 1;
    @(negedge clk);
    issue_valid[c] = 0;
    while (!done[c]) @(negedge clk);
    check("no illegal instruction", !illegal_insn[c]);
    ret = wb_data[c];
  endtask

  task automatic transfer(int c, int word, int n);
    logic [63:0] r;
    run(c, 3, 0, VBASE + 64'(word) * 8, 64'(n) * 8, r);
  endtask

  task automatic exec_wait(int c, int op);
    logic [63:0] r;
    run(c, 4, 0, 64'(op), 0, r);
    do run(c, 5, 0, 0, 0, r); while (r == ISB_BUSY);
    check("ISBUSY free after the operation", r == ISB_FREE);
  endtask

  longint unsigned t_dot_done = 0;
  longint unsigned t_path_own = 0;

  initial begin
    for (int c = 0; c < NC; c++) begin
      proc_id[c] = 64'(100 * (c + 1)); issue_valid[c] = 0; instr[c] = 0;
      rs1_val[c] = 0; rs2_val[c] = 0; rd_val[c] = 0;
    end
    for (int i = 0; i < 524288; i++) begin
      u_mem.mem[DA + i] = 64'($signed($urandom % 20001) - 10000);
      u_mem.mem[DB + i] = 64'($signed($urandom % 20001) - 10000);
    end
    for (int i = 0; i < ROWS * COLS; i++) u_mem.mem[PW + i] = 64'($urandom % 10);
    u_mem.mem[PA] = BIG; u_mem.mem[PA + COLS + 1] = BIG;
    u_mem.mem[PB] = BIG; u_mem.mem[PB + COLS + 1] = BIG;
    for (int i = 0; i < COLS; i++) u_mem.mem[PA + 1 + i] = u_mem.mem[PW + i];
    repeat (3) @(posedge clk);
    rst_n = 1;

    fork
      // ---------------- dot-product on core 0 ----------------
      begin
        int sizes [5] = '{128, 1024, 8192, 65536, 524288};
        logic [63:0] r;
        foreach (sizes[k]) begin
          int n;
          longint dot;
          longint unsigned t0, t_exec;
          n = sizes[k];
          dot = 0;
          for (int i = 0; i < n; i++) dot += longint'(u_mem.mem[DA + i]) * longint'(u_mem.mem[DB + i]);
          u_mem.mem[DD] = 64'hdead;
          t0 = cyc;
          if (k == 0) begin
            run(0, 1, 0, 0, 0, r);                       // RESERVE
            run(0, 2, 0, 0, 0, r);                       // CHECK
            check("dot owns the accelerator", r == CHK_RESERVED);
          end
          transfer(0, DA, n);
          transfer(0, DB, n);
          transfer(0, DD, 1);
          t_exec = cyc;
          exec_cycles = 0;
          exec_wait(0, 6);
          check($sformatf("dot-product %0d elements", n), longint'(u_mem.mem[DD]) == dot);
          check($sformatf("dot %0d execute cycles", n), exec_cycles == (n + LANES - 1) / LANES * 5);
          $display("dot-product n=%0d: setup %0d cycles, total %0d cycles, execute %0d cycles",
                   n, t_exec - t0, cyc - t0, exec_cycles);
        end
        t_dot_done = cyc;
        run(0, 6, 0, 0, 0, r);                           // RELEASE
      end
      // ---------------- pathfinder on core 1 ----------------
      begin
        logic [63:0] r;
        longint prev [COLS], next [COLS];
        int src, dst;
        longint unsigned t0;
        repeat (200) @(negedge clk);
        run(1, 1, 0, 0, 0, r);                           // RESERVE
        run(1, 2, 0, 0, 0, r);
        check("pathfinder waits in the queue", r == CHK_ENQUEUED);
        do run(1, 2, 0, 0, 0, r); while (r != CHK_RESERVED);
        t_path_own = cyc;
        check("pathfinder owns after dot-product released", t_dot_done != 0);
        t0 = cyc;
        for (int i = 0; i < COLS; i++) prev[i] = longint'(u_mem.mem[PW + i]);
        src = PA; dst = PB;
        for (int row = 1; row < ROWS; row++) begin
          transfer(1, src, COLS);               // prev[i-1]
          transfer(1, src + 1, COLS);           // prev[i]
          transfer(1, PT, COLS);
          exec_wait(1, 4);                      // min
          transfer(1, PT, COLS);
          transfer(1, src + 2, COLS);           // prev[i+1]
          transfer(1, PT, COLS);
          exec_wait(1, 4);                      // min
          transfer(1, PT, COLS);
          transfer(1, PW + row * COLS, COLS);   // wall row
          transfer(1, dst + 1, COLS);
          exec_wait(1, 0);                      // add
          for (int i = 0; i < COLS; i++) begin
            longint m;
            m = prev[i];
            if (i > 0 && prev[i - 1] < m) m = prev[i - 1];
            if (i < COLS - 1 && prev[i + 1] < m) m = prev[i + 1];
            next[i] = longint'(u_mem.mem[PW + row * COLS + i]) + m;
          end
          prev = next;
          begin int tmp; tmp = src; src = dst; dst = tmp; end
        end
        for (int i = 0; i < COLS; i++)
          check($sformatf("pathfinder column %0d", i), longint'(u_mem.mem[src + 1 + i]) == prev[i]);
        $display("pathfinder %0dx%0d: %0d cycles", ROWS, COLS, cyc - t0);
        run(1, 6, 0, 0, 0, r);                           // RELEASE
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
