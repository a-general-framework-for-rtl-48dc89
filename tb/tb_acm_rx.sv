// tb_acm_rx: sends random request ACMs (all six kinds, addressed to this
// receiver's accId 5 or to other accelerators) with random gaps and random
// consumer stalls. Every message for accId 5 must come out once, in order,
// with each field decoded at the packet positions of the message format;
// messages for other IDs must be dropped.
module tb_acm_rx;
  import acm_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock
  logic in_valid, in_ready, msg_valid, msg_ready;
  acm_flit_t in_flit;
  acm_msg_t msg;
  int checks = 0, failures = 0, dropped = 0, stalls = 0;
  acm_msg_t expq[$];

  acm_rx #(.ACC_ID(8'd5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  task automatic send_pkt(logic [63:0] d, logic last);
    // called just after a falling edge
    in_valid = 1; in_flit = '{data: d, last: last};
    forever begin
      #1;
      if (in_ready) break;
      stalls++;
      @(negedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    repeat ($urandom % 2) @(negedge clk);
  endtask

  // producer
  initial begin
    in_valid = 0; in_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      acm_msg_t m;
      m.inst    = acm_inst_e'(1 + $urandom % 6);
      m.acc_id  = ($urandom % 2) ? 8'd5 : 8'($urandom % 8);
      m.core_id = 8'($urandom);
      m.size    = {8'($urandom), 32'($urandom)};
      m.op_id   = 32'($urandom);
      m.proc_id = {32'($urandom), 32'($urandom)};
      m.pptr    = {32'($urandom), 32'($urandom)};
      if (m.acc_id == 8'd5) begin
        acm_msg_t e;
        e = '0;
        e.inst = m.inst; e.acc_id = m.acc_id; e.proc_id = m.proc_id;
        if (inst_is_sync(m.inst)) e.core_id = m.core_id;
        if (m.inst == INST_TRANSFER) begin e.size = m.size; e.pptr = m.pptr; end
        if (m.inst == INST_EXEC) e.op_id = m.op_id;
        expq.push_back(e);
      end else dropped++;
      @(negedge clk);
      send_pkt(req_head(m.inst, m.acc_id, m.core_id, m.size, m.op_id), 1'b0);
      send_pkt(m.proc_id, m.inst != INST_TRANSFER);
      if (m.inst == INST_TRANSFER) send_pkt(m.pptr, 1'b1);
    end
    repeat (50) @(posedge clk);
    check("all delivered", expq.size() == 0);
    check("saw dropped", dropped > 0);
    check("saw stalls", stalls > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer with random stalls
  always @(negedge clk) msg_ready = ($urandom % 4) == 0;

  always @(posedge clk) if (rst_n && msg_valid && msg_ready) begin
    acm_msg_t e;
    if (expq.size() == 0) check("unexpected message", 0);
    else begin
      e = expq.pop_front();
      check("inst", msg.inst == e.inst);
      check("acc_id", msg.acc_id == e.acc_id);
      check("proc_id", msg.proc_id == e.proc_id);
      if (inst_is_sync(e.inst)) check("core_id", msg.core_id == e.core_id);
      if (e.inst == INST_TRANSFER) check("size/pptr", msg.size == e.size && msg.pptr == e.pptr);
      if (e.inst == INST_EXEC) check("op_id", msg.op_id == e.op_id);
    end
  end
endmodule
