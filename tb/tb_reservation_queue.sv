// tb_reservation_queue: random push/pop/search traffic on a four-entry
// reservation queue, compared every cycle with a SystemVerilog queue used as
// the reference FIFO. Checks head, count, empty/full, the search results and
// that a push to a full queue is dropped (unless a pop frees a slot in the
// same cycle).
module tb_reservation_queue;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned W     = 32;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock
  logic push, pop;
  logic [W-1:0] push_id, search_id, head;
  logic found, found_head, empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int drops = 0, both = 0;
  logic [W-1:0] model[$];

  reservation_queue #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    push = 0; pop = 0; push_id = 0; search_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      push      = ($urandom % 3) != 0;
      pop       = ($urandom % 3) == 0;
      push_id   = $urandom % 8;
      search_id = $urandom % 8;
      #1;
      begin
        bit f;
        f = 0;
        foreach (model[i]) if (model[i] == search_id) f = 1;
        check("count", count == model.size());
        check("empty", empty == (model.size() == 0));
        check("full", full == (model.size() == DEPTH));
        check("found", found == f);
        check("found_head", found_head == (model.size() > 0 && model[0] == search_id));
        if (model.size() > 0) check("head", head == model[0]);
      end
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push) begin
        if (model.size() < DEPTH) model.push_back(push_id);
        else drops++;
      end
      if (push && pop) both++;
    end
    check("saw drops", drops > 0);
    check("saw push+pop", both > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
