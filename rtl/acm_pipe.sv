// acm_pipe: a chain of STAGES registered valid/ready stages for ACM packets.
// It models the fixed transport delay of the accelerator NoC: a packet
// accepted at the input appears at the output STAGES cycles later when the
// output is not stalled, and one packet per cycle can flow. Each stage holds
// one packet and accepts a new one when it is empty or its content is leaving
// (ready = !valid || downstream ready). STAGES = 0 is a plain wire.
// The framework gives only the total delay; modelling it as a register
// chain is this design's choice.
module acm_pipe
  import acm_pkg::*;
#(
  parameter int unsigned STAGES = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  acm_flit_t in_flit,
  output logic      out_valid,
  input  logic      out_ready,
  output acm_flit_t out_flit
);

  if (STAGES == 0) begin : g_wire
    assign out_valid = in_valid;
    assign in_ready  = out_ready;
    assign out_flit  = in_flit;
  end else begin : g_stages
    logic      vld [STAGES+1];
    logic      rdy [STAGES+1];
    acm_flit_t flt [STAGES+1];

    assign vld[0]     = in_valid;
    assign flt[0]     = in_flit;
    assign in_ready   = rdy[0];
    assign out_valid  = vld[STAGES];
    assign out_flit   = flt[STAGES];
    assign rdy[STAGES] = out_ready;

    for (genvar s = 0; s < STAGES; s++) begin : g_stage
      assign rdy[s] = !vld[s+1] || rdy[s+1];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          vld[s+1] <= 1'b0;
          flt[s+1] <= '0;
        end else if (rdy[s]) begin
          vld[s+1] <= vld[s];
          flt[s+1] <= flt[s];
        end
      end
    end
  end

endmodule
