// npa_pkg: types and constants shared by the Nested Parallel Accelerator (NPA).
//
// The NPA runs join-free nested threads: a spawn command names a seed (for unit
// propagation, a literal), a thread count and a code label; every thread of the
// group gets the same seed and label and a unique id in [0, count-1]. The spawn
// record and thread record below carry exactly those three fields, as the
// spawn instruction defines them.
//
// Memory traffic from the CPU, the TRSs and the TEUs is a single-word request
// (load, store or atomic) tagged with the requester's port number; the shared
// cache answers every request, stores and atomics included, with one response
// routed back by that tag. Word width, tag width and the encoding of the new
// instructions are this design's own choices (the custom-0 major opcode is used).
package npa_pkg;

  localparam int unsigned XLEN     = 32;
  localparam int unsigned PORT_W   = 9;    // requester tag width: up to 512 memory ports

  // Spawn command as held in the Spawn Waiting Buffer.
  typedef struct packed {
    logic [XLEN-1:0] seed;   // R_seed
    logic [XLEN-1:0] count;  // R_count
    logic [XLEN-1:0] label;  // byte address of the TRS entry point in stencil memory
  } spawn_t;

  // One thread as handed to a TRS.
  typedef struct packed {
    logic [XLEN-1:0] seed;
    logic [XLEN-1:0] tid;    // unique id in [0, count-1]
    logic [XLEN-1:0] label;
  } thread_t;

  typedef enum logic [1:0] {
    MEM_LOAD  = 2'd0,
    MEM_STORE = 2'd1,
    MEM_AMO   = 2'd2
  } mem_op_e;

  // RISC-V "A" extension funct5 codes for the AMOs the cache banks perform.
  typedef enum logic [4:0] {
    AMO_ADD  = 5'b00000,
    AMO_SWAP = 5'b00001,
    AMO_XOR  = 5'b00100,
    AMO_OR   = 5'b01000,
    AMO_AND  = 5'b01100,
    AMO_MIN  = 5'b10000,
    AMO_MAX  = 5'b10100,
    AMO_MINU = 5'b11000,
    AMO_MAXU = 5'b11100
  } amo_fn_e;

  typedef struct packed {
    mem_op_e           op;
    amo_fn_e           amo;
    logic [XLEN-1:0]   addr;    // byte address; the word at addr[31:2] is accessed
    logic [XLEN-1:0]   wdata;
    logic [3:0]        wstrb;   // byte enables for stores
    logic [PORT_W-1:0] src;     // requester port, used to route the response
  } mem_req_t;

  typedef struct packed {
    logic [XLEN-1:0]   rdata;   // loaded word, or the old word for an AMO
    logic [PORT_W-1:0] dst;
  } mem_rsp_t;

  // Custom instructions (major opcode custom-0 = 7'b0001011), selected by funct3.
  //   spawn rs1=R_seed, rs2=R_count, label = S-type immediate (byte address)
  //   trs_halt, teu_halt: no operands
  localparam logic [6:0] OPC_NPA      = 7'b0001011;
  localparam logic [2:0] F3_SPAWN     = 3'd0;
  localparam logic [2:0] F3_TRS_HALT  = 3'd1;
  localparam logic [2:0] F3_TEU_HALT  = 3'd2;

  // A TEU store to this address is not sent to memory: it raises the conflict
  // signal to the Control Unit, which then halts all threads.
  localparam logic [XLEN-1:0] CONFLICT_ADDR = 32'hFFFF_FFFC;

  // Registers a thread starts with in its TRS (RISC-V ABI a0/a1).
  localparam int unsigned REG_SEED = 10;
  localparam int unsigned REG_TID  = 11;

  // AMO result function used by the cache banks.
  function automatic logic [XLEN-1:0] amo_apply(amo_fn_e fn, logic [XLEN-1:0] old_v,
                                                logic [XLEN-1:0] src_v);
    unique case (fn)
      AMO_ADD:  return old_v + src_v;
      AMO_SWAP: return src_v;
      AMO_XOR:  return old_v ^ src_v;
      AMO_OR:   return old_v | src_v;
      AMO_AND:  return old_v & src_v;
      AMO_MIN:  return ($signed(old_v) < $signed(src_v)) ? old_v : src_v;
      AMO_MAX:  return ($signed(old_v) > $signed(src_v)) ? old_v : src_v;
      AMO_MINU: return (old_v < src_v) ? old_v : src_v;
      AMO_MAXU: return (old_v > src_v) ? old_v : src_v;
      default:  return old_v;
    endcase
  endfunction

  // Byte-enable merge for stores.
  function automatic logic [XLEN-1:0] merge_bytes(logic [XLEN-1:0] old_v, logic [XLEN-1:0] new_v,
                                                  logic [3:0] strb);
    logic [XLEN-1:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? new_v[8*b +: 8] : old_v[8*b +: 8];
    return r;
  endfunction

  // Per-clock activity of the accelerator, offered to the host for performance
  // counting. Bank events are ORed over the banks.
  typedef struct packed {
    logic swb_full;     // a spawn command waited because the SWB was full
    logic multi;        // more than one thread was dispatched this clock
    logic dual;         // dispatch drew threads from two spawn commands at once
    logic teu_wait;     // a ready TRS waited because its TEU was busy
    logic teu_start;    // a thread moved from a TRS to its TEU
    logic teu_halt;     // a thread ended
    logic nested;       // a spawn from a TEU was accepted
    logic kill;         // conflict halt
    logic req_blocked;  // a request lost a switch in the request network
    logic rsp_blocked;  // a response lost a switch in the response network
    logic hit;          // a cache bank served an access
    logic miss;         // a cache bank started a line fill
    logic writeback;    // a dirty victim was written back
    logic queued;       // an access waited behind another in a bank queue
    logic mem_busy;     // a main-memory bank had a read outstanding
  } npa_events_t;

endpackage
