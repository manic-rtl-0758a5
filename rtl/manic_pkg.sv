// manic_pkg: types and constants shared by the MANIC vector-dataflow (VDF)
// coprocessor and the surrounding system.
//
// The coprocessor sees a 16-register vector register file of 4 KB, so each
// vector register holds 64 words of 32 bits. A window of decoded vector
// instructions is buffered, renamed against a 16-entry rename table of 9-bit
// entries (144 bits in all) and then executed element by element, with
// intermediate values passed through a 32-byte (8-slot) forwarding buffer.
//
// The vector instruction encoding below is this design's own; the reference
// design only names the instruction classes (arithmetic, multiply, load,
// store, vfence) and the per-operand "kill" hint:
//   [4:0]   op           vector operation (vop_e)
//   [8:5]   vd           destination vector register
//   [12:9]  vs1          first source (store data for VSTORE)
//   [16:13] vs2          second source
//   [17]    kill1        vs1 is read for the last time (its value is dead after)
//   [18]    kill2        vs2 is read for the last time
//   [19]    scalar_b     second operand is the scalar operand, not vs2
//   [31:20] reserved, zero
// Each instruction arrives with a 32-bit scalar operand from the core: the
// base byte address of VLOAD / VSTORE (unit stride, 4-byte words), the second
// operand when scalar_b is set, or the new vector length for VSETVL.
//
// The memory request/response bus used between the core ports, caches,
// arbiters, main memory and IO bus carries one transaction at a time: a
// request is accepted when req_valid && req_ready, and exactly one response
// (rsp_valid for one cycle, with read data for reads) follows on a later cycle.
// A requester raises no new request until that response has arrived.
package manic_pkg;

  localparam int unsigned VDF_NREGS   = 16;   // vector registers (16-entry rename table)
  localparam int unsigned VDF_VLMAX    = 64;   // 4 KB / 16 registers / 4 bytes
  localparam int unsigned VDF_WINDOW   = 16;   // instruction-buffer entries
  localparam int unsigned VDF_FB_SLOTS = 8;    // 32-byte forwarding buffer / 4 bytes

  typedef enum logic [4:0] {
    OP_VADD   = 5'd0,
    OP_VSUB   = 5'd1,
    OP_VAND   = 5'd2,
    OP_VOR    = 5'd3,
    OP_VXOR   = 5'd4,
    OP_VSLL   = 5'd5,
    OP_VSRL   = 5'd6,
    OP_VSRA   = 5'd7,
    OP_VSLT   = 5'd8,
    OP_VSLTU  = 5'd9,
    OP_VMIN   = 5'd10,
    OP_VMAX   = 5'd11,
    OP_VMUL   = 5'd12,
    OP_VLOAD  = 5'd16,
    OP_VSTORE = 5'd17,
    OP_VSETVL = 5'd20,
    OP_VFENCE = 5'd21
  } vop_e;

  // Raw vector instruction as issued by the core.
  typedef struct packed {
    logic [11:0] rsvd;
    logic        scalar_b;
    logic        kill2;
    logic        kill1;
    logic [3:0]  vs2;
    logic [3:0]  vs1;
    logic [3:0]  vd;
    vop_e        op;
  } vinsn_t;

  // Where an operand comes from once renamed.
  typedef enum logic [1:0] {
    SRC_NONE   = 2'd0,
    SRC_VRF    = 2'd1,
    SRC_FB     = 2'd2,
    SRC_SCALAR = 2'd3
  } src_kind_e;

  typedef struct packed {
    src_kind_e  kind;
    logic [3:0] vreg;   // VRF register when kind == SRC_VRF
    logic [2:0] slot;   // forwarding-buffer slot when kind == SRC_FB
  } src_t;

  // Decoded, renamed instruction-buffer entry.
  typedef struct packed {
    vop_e        op;
    logic [3:0]  vd;
    src_t        a;
    src_t        b;
    logic [31:0] scalar;
    logic        vrf_wb;   // write the result to the VRF (cleared by a kill hint)
    logic        fb_wb;    // write the result to a forwarding-buffer slot
    logic [2:0]  fb_slot;
  } ib_entry_t;

  // Rename-table entry: 9 bits, 16 entries = 144 bits.
  typedef struct packed {
    logic       valid;    // register last written by an instruction in the window
    logic [3:0] idx;      // instruction-buffer index of that producer
    logic       fbv;      // producer already owns a forwarding-buffer slot
    logic [2:0] slot;     // that slot
  } rename_t;

  typedef struct packed {
    logic [31:0] addr;
    logic        we;
    logic [3:0]  be;
    logic [31:0] wdata;
  } mem_req_t;

  function automatic logic op_is_mul(vop_e op);
    return op == OP_VMUL;
  endfunction

  function automatic logic op_is_alu(vop_e op);
    return op <= OP_VMAX;
  endfunction

  function automatic logic op_is_mem(vop_e op);
    return (op == OP_VLOAD) || (op == OP_VSTORE);
  endfunction

  // Instruction writes a vector result.
  function automatic logic op_writes(vop_e op);
    return op_is_alu(op) || op_is_mul(op) || (op == OP_VLOAD);
  endfunction

  // Instruction reads vs1 / vs2 (or the scalar in place of vs2).
  function automatic logic op_uses_a(vop_e op);
    return op_is_alu(op) || op_is_mul(op) || (op == OP_VSTORE);
  endfunction

  function automatic logic op_uses_b(vop_e op);
    return op_is_alu(op) || op_is_mul(op);
  endfunction

endpackage
