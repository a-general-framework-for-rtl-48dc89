// tb_anoc: three cores send random two- and three-packet request messages at
// the same time to two accelerators that stall at random; the accelerators
// send single-packet responses addressed to random cores. Checks that the
// request packets of one message arrive contiguously at every accelerator
// (the NoC serialises messages), that each core's messages arrive once and
// in order, that every response reaches exactly the core named in its
// coreId field in order, and that on an idle network a packet needs exactly
// LATENCY cycles from input handshake to output handshake on both paths.
module tb_anoc;
  import acm_pkg::*;
  localparam int unsigned NC = 3, NA = 2, LAT = 3;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock
  logic      core_req_valid  [NC];
  logic      core_req_ready  [NC];
  acm_flit_t core_req_flit   [NC];
  logic      core_resp_valid [NC];
  logic      core_resp_ready [NC];
  acm_flit_t core_resp_flit  [NC];
  logic      acc_req_valid   [NA];
  logic      acc_req_ready   [NA];
  acm_flit_t acc_req_flit;
  logic      acc_resp_valid  [NA];
  logic      acc_resp_ready  [NA];
  acm_flit_t acc_resp_flit   [NA];
  int checks = 0, failures = 0;
  bit random_stalls = 0;

  anoc #(.NUM_CORES(NC), .NUM_ACC(NA), .LATENCY(LAT)) dut (.*);

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

  // packet data: [63:56] source core, [55:40] message number, [39:32] packet index
  int next_msg [NC];
  int seen_msg [NC];
  int cur_src = -1, cur_idx = 0;
  int resp_sent [NA], resp_seen [NA][NC];
  int resp_next [NA][NC];
  int done_cores = 0;

  always @(negedge clk) begin
    for (int a = 0; a < NA; a++) acc_req_ready[a] = random_stalls ? ($urandom % 3) != 0 : 1'b1;
    for (int c = 0; c < NC; c++) core_resp_ready[c] = random_stalls ? ($urandom % 2) != 0 : 1'b1;
  end

  // accelerator side of the request path
  always @(posedge clk) if (rst_n && acc_req_valid[0] && acc_req_ready[0]) begin
    int src, msgn, idx;
    check("broadcast taken by all at once", acc_req_valid[1] && acc_req_ready[1]);
    src  = acc_req_flit.data[63:56];
    msgn = acc_req_flit.data[55:40];
    idx  = acc_req_flit.data[39:32];
    if (cur_src == -1) begin
      check("message starts with packet 0", idx == 0);
      check("message order per core", msgn == seen_msg[src]);
      cur_src = src;
      cur_idx = 0;
    end else begin
      check("no interleaving", src == cur_src);
      check("packet order", idx == cur_idx);
    end
    cur_idx++;
    if (acc_req_flit.last) begin
      cur_src = -1;
      seen_msg[src]++;
    end
  end

  // core side of the response path
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NC; c++)
      if (core_resp_valid[c] && core_resp_ready[c]) begin
        int a;
        a = core_resp_flit[c].data[63:56];
        check("response to named core", core_resp_flit[c].data[15:8] == c);
        check("response order", core_resp_flit[c].data[55:40] == resp_seen[a][c]);
        resp_seen[a][c]++;
      end

  task automatic core_send(int c, int npk);
    for (int i = 0; i < npk; i++) begin
      core_req_valid[c] = 1;
      core_req_flit[c]  = '{data: {8'(c), 16'(next_msg[c]), 8'(i), 32'($urandom)}, last: i == npk - 1};
      forever begin
        #1;
        if (core_req_ready[c]) break;
        @(negedge clk);
      end
      @(negedge clk);
      core_req_valid[c] = 0;
    end
    next_msg[c]++;
  endtask

  task automatic acc_send(int a, int c);
    acc_resp_valid[a] = 1;
    acc_resp_flit[a]  = '{data: {8'(a), 16'(resp_next[a][c]), 24'($urandom), 8'(c), 8'(a)}, last: 1'b1};
    forever begin
      #1;
      if (acc_resp_ready[a]) break;
      @(negedge clk);
    end
    @(negedge clk);
    acc_resp_valid[a] = 0;
    resp_next[a][c]++;
  endtask

  initial begin
    int t;
    for (int c = 0; c < NC; c++) begin
      core_req_valid[c] = 0; core_req_flit[c] = '0; next_msg[c] = 0; seen_msg[c] = 0;
    end
    for (int a = 0; a < NA; a++) begin
      acc_resp_valid[a] = 0; acc_resp_flit[a] = '0;
      for (int c = 0; c < NC; c++) begin resp_seen[a][c] = 0; resp_next[a][c] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // latency on an idle network
    @(negedge clk);
    fork
      core_send(1, 2);
      begin
        t = 0;
        #1 while (!acc_req_valid[0]) begin @(negedge clk); #1 t++; end
      end
    join
    check("request latency", t == LAT);
    @(negedge clk);
    fork
      acc_send(1, 2);
      begin
        t = 0;
        #1 while (!core_resp_valid[2]) begin @(negedge clk); #1 t++; end
      end
    join
    check("response latency", t == LAT);
    repeat (10) @(negedge clk);

    // concurrent random traffic
    random_stalls = 1;
    fork
      for (int k = 0; k < 40; k++) core_send(0, 2 + $urandom % 2);
      for (int k = 0; k < 40; k++) core_send(1, 2 + $urandom % 2);
      for (int k = 0; k < 40; k++) core_send(2, 2 + $urandom % 2);
      for (int k = 0; k < 60; k++) acc_send(0, $urandom % NC);
      for (int k = 0; k < 60; k++) acc_send(1, $urandom % NC);
    join
    repeat (50) @(negedge clk);
    for (int c = 0; c < NC; c++) check("all requests delivered", seen_msg[c] == next_msg[c]);
    for (int a = 0; a < NA; a++)
      for (int c = 0; c < NC; c++) check("all responses delivered", resp_seen[a][c] == resp_next[a][c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
