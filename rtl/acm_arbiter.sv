// acm_arbiter: round-robin merge of N ACM packet channels into one.
// A source that wins keeps the grant until the packet marked last has been
// transferred, so the packets of one message are never interleaved with
// another message (the NoC serialises concurrent commands). Between
// messages the search for the next valid source starts one past the source
// served last. Grant selection is combinational on the input valids; the
// grant is registered only while a message is in flight.
// The framework asks only that the network serialise concurrent commands;
// round-robin order is this design's choice.
module acm_arbiter
  import acm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid [N],
  output logic      in_ready [N],
  input  acm_flit_t in_flit  [N],
  output logic      out_valid,
  input  logic      out_ready,
  output acm_flit_t out_flit
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          locked_q;
  logic [IW-1:0] owner_q;   // source holding the grant while locked
  logic [IW-1:0] last_q;    // source served last, for round robin
  logic [IW-1:0] sel;
  logic          any;

  always_comb begin
    logic [IW-1:0] idx;
    sel = owner_q;
    any = 1'b0;
    idx = last_q;
    if (locked_q) begin
      any = 1'b1;
    end else begin
      for (int unsigned k = 1; k <= N; k++) begin
        idx = IW'((32'(last_q) + k) % N);
        if (!any && in_valid[idx]) begin
          any = 1'b1;
          sel = idx;
        end
      end
    end
  end

  assign out_valid = any && in_valid[sel];
  assign out_flit  = in_flit[sel];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) in_ready[i] = any && (IW'(i) == sel) && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      owner_q  <= '0;
      last_q   <= IW'(N - 1);
    end else if (out_valid && out_ready) begin
      locked_q <= !out_flit.last;
      owner_q  <= sel;
      last_q   <= sel;
    end
  end

endmodule
