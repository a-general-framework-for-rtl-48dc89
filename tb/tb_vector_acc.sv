// tb_vector_acc: runs every vector operation (add, sub, mul, div, min, max,
// dot-product, reduce-sum) on random vectors whose lengths are and are not
// multiples of the lane count, with the L3 model stalling at random.
// Results in memory are compared with values computed here; division by
// zero and the overflowing quotient are forced in. The cycles spent in the
// execute step must equal the number of strips times the operation's
// latency (2, 2, 5, 14, 4, 4, 5, 2 cycles). Reduce-sum must report that it
// needs two buffers (the others three), write to buffer 1 and never read
// the B area. Loads of a later strip must overlap the execute or store
// step of an earlier one at least once.
module tb_vector_acc;
  import acm_pkg::*;
  localparam int unsigned LANES = 4;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock
  logic start, done;
  logic [OPID_W-1:0] start_op, op_query;
  logic [1:0] op_bufs;
  buf_desc_t bufs [3];
  logic ld_req_valid, ld_req_ready, ld_resp_valid, st_req_valid, st_req_ready;
  logic [63:0] ld_req_addr, ld_resp_rdata, st_req_addr, st_req_wdata;
  logic stall_en = 1;
  int checks = 0, failures = 0;
  int exec_cycles = 0;
  int b_reads = 0;
  int overlap = 0;

  vector_acc #(.LANES(LANES)) dut (.*);

  l3_mem_model #(.WORDS(2048), .LATENCY(5)) u_mem (
    .clk, .stall_en, .req_valid(ld_req_valid), .req_ready(ld_req_ready),
    .req_write(1'b0), .req_addr(ld_req_addr), .req_wdata(64'd0),
    .resp_valid(ld_resp_valid), .resp_rdata(ld_resp_rdata),
    .st_valid(st_req_valid), .st_ready(st_req_ready), .st_addr(st_req_addr), .st_wdata(st_req_wdata));

  always #5 clk = ~clk;
  always @(posedge clk) if (ld_req_valid && (dut.ex_busy_q || st_req_valid)) overlap++;
  always @(posedge clk) if (dut.ex_busy_q) exec_cycles++;   // execute step
  always @(posedge clk)
    if (ld_req_valid && ld_req_ready &&
        ld_req_addr >= 64'h800 && ld_req_addr < 64'h1000) b_reads++;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic longint ref_op(int op, longint a, longint b);
    case (op)
      0: return a + b;
      1: return a - b;
      2, 6: return a * b;
      3: begin
        if (b == 0) return -1;
        if (a == 64'h8000_0000_0000_0000 && b == -1) return a;
        return a / b;
      end
      4: return (a < b) ? a : b;
      default: return (a > b) ? a : b;
    endcase
  endfunction

  function automatic int lat(int op);
    case (op)
      0, 1, 7: return 2;
      2, 6: return 5;
      3: return 14;
      default: return 4;
    endcase
  endfunction

  initial begin
    start = 0; start_op = 0; op_query = 0;
    foreach (bufs[i]) bufs[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int op = 0; op < 8; op++) begin
        int n;
        longint a[], b[];
        longint dot, rsum;
        int strips;
        n = (rep == 0) ? 8 : 1 + $urandom % 23;
        a = new[n]; b = new[n];
        dot = 0; rsum = 0;
        for (int i = 0; i < n; i++) begin
          a[i] = longint'($signed($urandom % 2001)) - 1000;
          b[i] = longint'($signed($urandom % 21)) - 10;
          if (i == 0 && op == 3) begin a[i] = 64'h8000_0000_0000_0000; b[i] = -1; end
          u_mem.mem[i]       = a[i];
          u_mem.mem[256 + i] = b[i];
          u_mem.mem[512 + i] = 64'hdead;
          dot += a[i] * b[i];
          rsum += a[i];
        end
        strips = (n + LANES - 1) / LANES;
        stall_en = (rep != 0);
        @(negedge clk);
        bufs[0] = '{pptr: 64'h0,    size: 40'(n * 8)};
        bufs[1] = '{pptr: 64'h800,  size: 40'(n * 8)};
        bufs[2] = '{pptr: 64'h1000, size: 40'(n * 8)};
        if (op == 7) begin   // reduce-sum: A and the destination only
          bufs[1] = '{pptr: 64'h1000, size: 40'(8)};
          bufs[2] = '{pptr: 64'h800, size: 40'(8)};
        end
        op_query = 32'(op);
        #1 check("buffers needed", op_bufs == ((op == 7) ? 2'd2 : 2'd3));
        start_op = 32'(op); start = 1;
        exec_cycles = 0;
        b_reads = 0;
        @(negedge clk);
        start = 0;
        bufs[0] = '0;   // the datapath must have copied the descriptors
        while (!done) @(negedge clk);
        check($sformatf("exec cycles op %0d", op), exec_cycles == strips * lat(op));
        if (op == 6) check("dot", longint'(u_mem.mem[512]) == dot);
        else if (op == 7) begin
          check("reduce-sum", longint'(u_mem.mem[512]) == rsum);
          check("reduce-sum reads no B", b_reads == 0);
        end
        else
          for (int i = 0; i < n; i++)
            check($sformatf("op %0d elem %0d", op, i),
                  longint'(u_mem.mem[512 + i]) == ref_op(op, a[i], b[i]));
        if (op >= 6 && n > 1) check("dot writes one word", u_mem.mem[513] == 64'hdead);
      end
    end
    check("load overlaps execute or store", overlap > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
