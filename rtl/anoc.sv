// anoc: the accelerator network-on-chip that links NUM_CORES core-side ACM
// units with NUM_ACC accelerator managers.
//
// Request path: a round-robin arbiter serialises the request ACMs of the
// cores (a message keeps the path until its last packet), a LATENCY-stage
// pipeline models the transport delay, and every packet is then broadcast
// to all accelerators. Each accelerator compares the accId of the message
// with its own ID and keeps only its own messages. A packet leaves the
// pipeline when all accelerators accept it: accelerator a sees it valid only
// while all the others are ready, so every one takes it in the same cycle.
// Response path: a second arbiter merges the response ACMs of the
// accelerators, a LATENCY-stage pipeline delays them, and each packet is
// delivered to the core named by its coreId field. A response for a core
// that does not exist is dropped.
//
// The framework leaves the interconnect open (a bus for few accelerators, a
// ring for many). This design uses the shared-bus form with a fixed
// one-way delay; the topology and the split of the delay are its own.
// All channels use valid/ready; valid never waits for ready.
module anoc
  import acm_pkg::*;
#(
  parameter int unsigned NUM_CORES = 4,
  parameter int unsigned NUM_ACC   = 4,
  parameter int unsigned LATENCY   = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  // from / to the cores
  input  logic      core_req_valid  [NUM_CORES],
  output logic      core_req_ready  [NUM_CORES],
  input  acm_flit_t core_req_flit   [NUM_CORES],
  output logic      core_resp_valid [NUM_CORES],
  input  logic      core_resp_ready [NUM_CORES],
  output acm_flit_t core_resp_flit  [NUM_CORES],
  // to / from the accelerators
  output logic      acc_req_valid   [NUM_ACC],
  input  logic      acc_req_ready   [NUM_ACC],
  output acm_flit_t acc_req_flit,
  input  logic      acc_resp_valid  [NUM_ACC],
  output logic      acc_resp_ready  [NUM_ACC],
  input  acm_flit_t acc_resp_flit   [NUM_ACC]
);

  // ---------------- request path ----------------
  logic      rq_valid, rq_ready;
  acm_flit_t rq_flit;
  logic      rq_all_ready, bc_valid;

  acm_arbiter #(.N(NUM_CORES)) u_req_arb (
    .clk, .rst_n,
    .in_valid (core_req_valid), .in_ready (core_req_ready), .in_flit (core_req_flit),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_flit(rq_flit)
  );

  acm_pipe #(.STAGES(LATENCY)) u_req_pipe (
    .clk, .rst_n,
    .in_valid (rq_valid), .in_ready (rq_ready), .in_flit (rq_flit),
    .out_valid(bc_valid), .out_ready(rq_all_ready), .out_flit(acc_req_flit)
  );

  always_comb begin
    rq_all_ready = 1'b1;
    for (int unsigned a = 0; a < NUM_ACC; a++) rq_all_ready &= acc_req_ready[a];
    for (int unsigned a = 0; a < NUM_ACC; a++) begin
      acc_req_valid[a] = bc_valid;
      for (int unsigned o = 0; o < NUM_ACC; o++)
        if (o != a) acc_req_valid[a] &= acc_req_ready[o];
    end
  end

  // ---------------- response path ----------------
  logic      rs_valid, rs_ready;
  acm_flit_t rs_flit;
  logic      rd_valid, rd_ready;
  acm_flit_t rd_flit;
  logic [COREID_W-1:0] dst;

  acm_arbiter #(.N(NUM_ACC)) u_resp_arb (
    .clk, .rst_n,
    .in_valid (acc_resp_valid), .in_ready (acc_resp_ready), .in_flit (acc_resp_flit),
    .out_valid(rs_valid), .out_ready(rs_ready), .out_flit(rs_flit)
  );

  acm_pipe #(.STAGES(LATENCY)) u_resp_pipe (
    .clk, .rst_n,
    .in_valid (rs_valid), .in_ready (rs_ready), .in_flit (rs_flit),
    .out_valid(rd_valid), .out_ready(rd_ready), .out_flit(rd_flit)
  );

  assign dst = pkt_core_id(rd_flit.data);

  always_comb begin
    rd_ready = 1'b1;   // drop responses for a non-existent core
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      core_resp_valid[c] = rd_valid && (dst == COREID_W'(c));
      core_resp_flit[c]  = rd_flit;
      if (dst == COREID_W'(c)) rd_ready = core_resp_ready[c];
    end
  end

endmodule
