// l3_mem_model: behavioural stand-in for the shared L3 cache port that an
// accelerator's DMA uses (not synthesizable; testbench only).
// Requests use valid/ready; req_ready is randomly withheld while stall_en
// is high. Writes are posted. A second, write-only port (st_*) serves a
// store unit; it stalls the same way and is applied after the first port
// in a cycle. Read data returns in request order LATENCY cycles
// after the request, at most one word per cycle. Memory is WORDS 64-bit
// words addressed by byte address / 8, wrapping.
module l3_mem_model #(
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 4
) (
  input  logic        clk,
  input  logic        stall_en,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_write,
  input  logic [63:0] req_addr,
  input  logic [63:0] req_wdata,
  output logic        resp_valid,
  output logic [63:0] resp_rdata,
  input  logic        st_valid,
  output logic        st_ready,
  input  logic [63:0] st_addr,
  input  logic [63:0] st_wdata
);
  localparam int unsigned IW = $clog2(WORDS);
  logic [63:0] mem [WORDS];
  longint unsigned cycle = 0;
  longint unsigned due_q[$];
  logic [63:0]     dat_q[$];
  int reads = 0, writes = 0;

  initial begin
    req_ready  = 1'b1;
    st_ready   = 1'b1;
    resp_valid = 1'b0;
    resp_rdata = '0;
    foreach (mem[i]) mem[i] = '0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (req_valid && req_ready) begin
      if (req_write) begin
        mem[IW'((req_addr >> 3) % 64'(WORDS))] = req_wdata;
        writes++;
      end else begin
        due_q.push_back(cycle + 64'(LATENCY));
        dat_q.push_back(mem[IW'((req_addr >> 3) % 64'(WORDS))]);
        reads++;
      end
    end
    if (due_q.size() > 0 && due_q[0] <= cycle) begin
      void'(due_q.pop_front());
      resp_rdata <= dat_q.pop_front();
      resp_valid <= 1'b1;
    end else begin
      resp_valid <= 1'b0;
    end
    if (st_valid && st_ready) begin
      mem[IW'((st_addr >> 3) % 64'(WORDS))] = st_wdata;
      writes++;
    end
    req_ready <= stall_en ? (($urandom % 4) != 0) : 1'b1;
    st_ready  <= stall_en ? (($urandom % 4) != 0) : 1'b1;
  end
endmodule
