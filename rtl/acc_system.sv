// acc_system: the accelerator fabric of an SoC that manages integrated
// accelerators through six RISC-V instructions instead of device drivers.
//
// NUM_CORES core-side ACM units (core_acm_unit) turn the accelerator
// instructions of the cores into request ACMs. The ANoC (anoc) serialises
// them and broadcasts them to NUM_ACC accelerator managers (acc_manager);
// each manager keeps the messages carrying its own accId, arbitrates
// ownership with its reservation queue, records buffers, starts
// operations and answers CHECK/ISBUSY with response ACMs that the ANoC
// returns to the asking core. Accelerator 0 is the vector accelerator
// (vector_acc with its two DMAs), whose L3 load and store ports are
// brought out. Accelerators 1 to NUM_ACC-1 (in the reference system an
// FFT, an AES-128 and a convolution engine) are represented by their
// managers only; their datapath side
// (start, opId, buffer descriptors, done) is brought out as ports, and
// their managers take every operation to need all three buffers.
//
// Per core c, the host pipeline drives issue_valid[c]/instr[c] with the
// register values rs1/rs2/rd and the CSR procId, and answers the TLB lookup
// tlb_vaddr[c] -> tlb_paddr[c] in the same cycle; done[c] marks commit,
// with illegal_insn[c] or a register write-back. The core IDs are the
// indices 0 to NUM_CORES-1; accelerator IDs are 0 to NUM_ACC-1.
// Defaults follow the reference system: four cores, four accelerators, a
// 16-cycle one-way ANoC latency, a four-entry reservation queue.
module acc_system
  import acm_pkg::*;
#(
  parameter int unsigned NUM_CORES    = 4,
  parameter int unsigned NUM_ACC      = 4,
  parameter int unsigned ANOC_LATENCY = 16,
  parameter int unsigned QUEUE_DEPTH  = 4,
  parameter int unsigned LANES        = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // cores
  input  logic [ACM_W-1:0]  proc_id      [NUM_CORES],
  input  logic              issue_valid  [NUM_CORES],
  output logic              issue_ready  [NUM_CORES],
  input  logic [31:0]       instr        [NUM_CORES],
  input  logic [XLEN-1:0]   rs1_val      [NUM_CORES],
  input  logic [XLEN-1:0]   rs2_val      [NUM_CORES],
  input  logic [XLEN-1:0]   rd_val       [NUM_CORES],
  output logic [XLEN-1:0]   tlb_vaddr    [NUM_CORES],
  input  logic [PTR_W-1:0]  tlb_paddr    [NUM_CORES],
  output logic              done         [NUM_CORES],
  output logic              illegal_insn [NUM_CORES],
  output logic              wb_valid     [NUM_CORES],
  output logic [4:0]        wb_rd        [NUM_CORES],
  output logic [XLEN-1:0]   wb_data      [NUM_CORES],
  // vector accelerator L3 load port, then store port
  output logic              ld_req_valid,
  input  logic              ld_req_ready,
  output logic [PTR_W-1:0]  ld_req_addr,
  input  logic              ld_resp_valid,
  input  logic [63:0]       ld_resp_rdata,
  output logic              st_req_valid,
  input  logic              st_req_ready,
  output logic [PTR_W-1:0]  st_req_addr,
  output logic [63:0]       st_req_wdata,
  // datapath side of accelerators 1 .. NUM_ACC-1
  output logic              ext_start    [NUM_ACC-1],
  output logic [OPID_W-1:0] ext_op       [NUM_ACC-1],
  output buf_desc_t         ext_bufs     [NUM_ACC-1][3],
  input  logic              ext_done     [NUM_ACC-1],
  // status of every accelerator
  output logic              acc_busy     [NUM_ACC],
  output logic [1:0]        acc_state    [NUM_ACC]
);

  // ---------------- cores ----------------
  logic      c_req_valid  [NUM_CORES];
  logic      c_req_ready  [NUM_CORES];
  acm_flit_t c_req_flit   [NUM_CORES];
  logic      c_resp_valid [NUM_CORES];
  logic      c_resp_ready [NUM_CORES];
  acm_flit_t c_resp_flit  [NUM_CORES];

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    core_acm_unit #(.NUM_ACC(NUM_ACC)) u_core (
      .clk, .rst_n,
      .core_id     (COREID_W'(c)),
      .proc_id     (proc_id[c]),
      .issue_valid (issue_valid[c]),
      .issue_ready (issue_ready[c]),
      .instr       (instr[c]),
      .rs1_val     (rs1_val[c]),
      .rs2_val     (rs2_val[c]),
      .rd_val      (rd_val[c]),
      .tlb_vaddr   (tlb_vaddr[c]),
      .tlb_paddr   (tlb_paddr[c]),
      .done        (done[c]),
      .illegal_insn(illegal_insn[c]),
      .wb_valid    (wb_valid[c]),
      .wb_rd       (wb_rd[c]),
      .wb_data     (wb_data[c]),
      .req_valid   (c_req_valid[c]),
      .req_ready   (c_req_ready[c]),
      .req_flit    (c_req_flit[c]),
      .resp_valid  (c_resp_valid[c]),
      .resp_ready  (c_resp_ready[c]),
      .resp_flit   (c_resp_flit[c])
    );
  end

  // ---------------- ANoC ----------------
  logic      a_req_valid  [NUM_ACC];
  logic      a_req_ready  [NUM_ACC];
  acm_flit_t a_req_flit;
  logic      a_resp_valid [NUM_ACC];
  logic      a_resp_ready [NUM_ACC];
  acm_flit_t a_resp_flit  [NUM_ACC];

  anoc #(.NUM_CORES(NUM_CORES), .NUM_ACC(NUM_ACC), .LATENCY(ANOC_LATENCY)) u_anoc (
    .clk, .rst_n,
    .core_req_valid (c_req_valid),  .core_req_ready (c_req_ready),  .core_req_flit (c_req_flit),
    .core_resp_valid(c_resp_valid), .core_resp_ready(c_resp_ready), .core_resp_flit(c_resp_flit),
    .acc_req_valid  (a_req_valid),  .acc_req_ready  (a_req_ready),  .acc_req_flit  (a_req_flit),
    .acc_resp_valid (a_resp_valid), .acc_resp_ready (a_resp_ready), .acc_resp_flit (a_resp_flit)
  );

  // ---------------- accelerators ----------------
  logic              m_start [NUM_ACC];
  logic [OPID_W-1:0] m_op    [NUM_ACC];
  logic [OPID_W-1:0] m_opq   [NUM_ACC];
  logic [1:0]        m_opbufs[NUM_ACC];
  buf_desc_t         m_bufs  [NUM_ACC][3];
  logic              m_done  [NUM_ACC];

  for (genvar a = 0; a < NUM_ACC; a++) begin : g_acc
    logic [31:0]                        owner_unused;
    logic [1:0]                         xfer_unused;

    acc_manager #(
      .ACC_ID     (ACCID_W'(a)),
      .K          (3),
      .QUEUE_DEPTH(QUEUE_DEPTH),
      .NUM_OPS    (a == 0 ? 8 : 256)
    ) u_mgr (
      .clk, .rst_n,
      .req_valid (a_req_valid[a]),
      .req_ready (a_req_ready[a]),
      .req_flit  (a_req_flit),
      .resp_valid(a_resp_valid[a]),
      .resp_ready(a_resp_ready[a]),
      .resp_flit (a_resp_flit[a]),
      .start     (m_start[a]),
      .start_op  (m_op[a]),
      .bufs      (m_bufs[a]),
      .done      (m_done[a]),
      .op_query  (m_opq[a]),
      .op_bufs   (m_opbufs[a]),
      .busy      (acc_busy[a]),
      .state     (acc_state[a]),
      .xfer_count(xfer_unused),
      .owner     (owner_unused)
    );

    if (a == 0) begin : g_vector
      vector_acc #(.LANES(LANES)) u_vec (
        .clk, .rst_n,
        .start   (m_start[a]),
        .start_op(m_op[a]),
        .bufs    (m_bufs[a]),
        .done    (m_done[a]),
        .op_query(m_opq[a]),
        .op_bufs (m_opbufs[a]),
        .ld_req_valid, .ld_req_ready, .ld_req_addr, .ld_resp_valid, .ld_resp_rdata,
        .st_req_valid, .st_req_ready, .st_req_addr, .st_req_wdata
      );
    end else begin : g_ext
      assign ext_start[a-1] = m_start[a];
      assign ext_op[a-1]    = m_op[a];
      assign ext_bufs[a-1]  = m_bufs[a];
      assign m_done[a]      = ext_done[a-1];
      assign m_opbufs[a]    = 2'd3;   // all operations take three buffers
    end
  end

endmodule
