// acm_pkg: types and constants shared by the core side, the accelerator NoC
// and the accelerator managers of the ISA-extension accelerator framework.
//
// Accelerator-Core Messages (ACMs) travel as a sequence of 64-bit packets.
// A request ACM is two packets (three for TRANSFER); a response ACM is one
// packet. Packet 0 bit positions below are numbered with bit 63 as the
// first (leftmost) bit of the packet drawings, so that the instruction code
// is the first byte and accId sits in the eight least significant bits:
//   packet 0 : [63:56] inst, [7:0] accId,
//              CHECK/ISBUSY [15:8] coreId,
//              TRANSFER     [47:8] size (40 bits),
//              EXEC         [39:8] opId (32 bits)
//   packet 1 : procId (64 bits)
//   packet 2 : pptr (TRANSFER only)
// The numeric instruction codes, the response packet layout and the
// ISBUSY error codes are this design's choice.
package acm_pkg;

  localparam int unsigned ACM_W    = 64;
  localparam int unsigned ACCID_W  = 8;
  localparam int unsigned COREID_W = 8;
  localparam int unsigned SIZE_W   = 40;
  localparam int unsigned OPID_W   = 32;
  localparam int unsigned PTR_W    = 64;
  localparam int unsigned RET_W    = 32;
  localparam int unsigned XLEN     = 64;

  // Instruction identifiers carried in the inst byte.
  typedef enum logic [7:0] {
    INST_NONE     = 8'd0,
    INST_RESERVE  = 8'd1,
    INST_CHECK    = 8'd2,
    INST_TRANSFER = 8'd3,
    INST_EXEC     = 8'd4,
    INST_ISBUSY   = 8'd5,
    INST_RELEASE  = 8'd6
  } acm_inst_e;

  // CHECK return values (fixed by the framework).
  localparam logic [RET_W-1:0] CHK_RESERVED = 'd0;
  localparam logic [RET_W-1:0] CHK_ENQUEUED = 'd1;
  localparam logic [RET_W-1:0] CHK_MISSING  = 'd2;

  // ISBUSY return values: 0 free, 1 busy (fixed); the two error codes are
  // this design's choice.
  localparam logic [RET_W-1:0] ISB_FREE      = 'd0;
  localparam logic [RET_W-1:0] ISB_BUSY      = 'd1;
  localparam logic [RET_W-1:0] ISB_BAD_OPID  = 'd2;
  localparam logic [RET_W-1:0] ISB_NOT_OWNER = 'd3;

  // One packet on an ACM channel plus the end-of-message marker.
  typedef struct packed {
    logic [ACM_W-1:0] data;
    logic             last;
  } acm_flit_t;

  // A fully received request ACM, as decoded by the accelerator.
  typedef struct packed {
    acm_inst_e             inst;
    logic [ACCID_W-1:0]    acc_id;
    logic [COREID_W-1:0]   core_id;
    logic [SIZE_W-1:0]     size;
    logic [OPID_W-1:0]     op_id;
    logic [ACM_W-1:0]      proc_id;
    logic [PTR_W-1:0]      pptr;
  } acm_msg_t;

  // A buffer announced by TRANSFER.
  typedef struct packed {
    logic [PTR_W-1:0]  pptr;
    logic [SIZE_W-1:0] size;
  } buf_desc_t;

  // Number of packets of a request ACM.
  function automatic int unsigned req_packets(acm_inst_e inst);
    return (inst == INST_TRANSFER) ? 3 : 2;
  endfunction

  function automatic logic inst_is_sync(acm_inst_e inst);
    return (inst == INST_CHECK) || (inst == INST_ISBUSY);
  endfunction

  // Packet 0 of a request ACM.
  function automatic logic [ACM_W-1:0] req_head(acm_inst_e inst,
                                                logic [ACCID_W-1:0] acc_id,
                                                logic [COREID_W-1:0] core_id,
                                                logic [SIZE_W-1:0] size,
                                                logic [OPID_W-1:0] op_id);
    logic [ACM_W-1:0] p;
    p        = '0;
    p[63:56] = inst;
    p[7:0]   = acc_id;
    unique case (inst)
      INST_CHECK, INST_ISBUSY: p[15:8] = core_id;
      INST_TRANSFER:           p[47:8] = size;
      INST_EXEC:               p[39:8] = op_id;
      default:                 ;
    endcase
    return p;
  endfunction

  // Response ACM: [63:56] inst, [47:16] ret, [15:8] coreId, [7:0] accId.
  function automatic logic [ACM_W-1:0] resp_pack(acm_inst_e inst,
                                                 logic [RET_W-1:0] ret,
                                                 logic [COREID_W-1:0] core_id,
                                                 logic [ACCID_W-1:0] acc_id);
    logic [ACM_W-1:0] p;
    p        = '0;
    p[63:56] = inst;
    p[47:16] = ret;
    p[15:8]  = core_id;
    p[7:0]   = acc_id;
    return p;
  endfunction

  function automatic logic [COREID_W-1:0] pkt_core_id(logic [ACM_W-1:0] p);
    return p[15:8];
  endfunction

  function automatic logic [RET_W-1:0] resp_ret(logic [ACM_W-1:0] p);
    return p[47:16];
  endfunction

  // RISC-V encoding of the six R-type instructions (this design's choice):
  // custom-0 major opcode, funct3 = 0, funct7 = instruction code.
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;

endpackage
