// Shared types and constants of the Scale vector-thread processor RTL.
//
// The memory system follows the organisation of the Scale chip: 32 KB of
// cache in four 8 KB banks that each read or write one 128-bit word per
// cycle, eight 32-entry tag CAM subbanks per bank (32-way set associative),
// 32 MSHRs per bank with up to 4 secondary misses each, and 11 requesters.
// The 32-byte line size and the address bit assignment below are this
// design's own choice; they follow from the sizes above:
//   addr[3:0]   byte within a 128-bit word
//   addr[4]     word within a 32-byte line
//   addr[6:5]   bank
//   addr[9:7]   set (tag CAM subbank)
//   addr[31:10] tag
// In on-chip RAM mode the word index inside a bank is {addr[14:7], addr[4]},
// so the 32 KB of RAM is the contiguous byte range 0..0x7FFF.
package scale_pkg;

  localparam int unsigned NREQ      = 11;   // memory requesters
  localparam int unsigned NBANK     = 4;    // cache banks
  localparam int unsigned RID_W     = 4;    // requester id width
  localparam int unsigned WORD_W    = 128;  // bank word
  localparam int unsigned BE_W      = WORD_W / 8;
  localparam int unsigned LINE_W    = 256;  // 32-byte line
  localparam int unsigned LADDR_W   = 27;   // line address = addr[31:5]
  localparam int unsigned TAG_W     = 22;   // addr[31:10]
  localparam int unsigned SETS      = 8;    // tag subbanks per bank
  localparam int unsigned WAYS      = 32;   // entries per subbank
  localparam int unsigned MSHRS     = 32;
  localparam int unsigned REPLAYS   = 4;    // secondary misses per MSHR
  localparam int unsigned BANK_WORDS = 512; // 8 KB / 16 B

  // Request as seen by a bank (after the address and write crossbars).
  typedef struct packed {
    logic              we;
    logic [31:0]       addr;
    logic [RID_W-1:0]  rid;
    logic [BE_W-1:0]   be;
    logic [WORD_W-1:0] wdata;
  } bank_req_t;

  // Response from a bank, steered back by the read crossbar using rid.
  typedef struct packed {
    logic              valid;
    logic [RID_W-1:0]  rid;
    logic [WORD_W-1:0] rdata;
  } bank_rsp_t;

  // One request parked in an MSHR replay slot.
  typedef struct packed {
    logic [RID_W-1:0]  rid;
    logic              we;
    logic              word;     // addr[4]
    logic [BE_W-1:0]   be;
    logic [WORD_W-1:0] wdata;
  } miss_slot_t;

  // Bank -> external memory interface: a refill or a dirty-line writeback.
  typedef struct packed {
    logic               valid;
    logic               is_wb;
    logic [LADDR_W-1:0] line;
    logic [4:0]         mshr;
    logic [LINE_W-1:0]  data;
  } line_req_t;

  // External memory interface -> bank: refill data for an MSHR.
  typedef struct packed {
    logic              valid;
    logic [4:0]        mshr;
    logic [LINE_W-1:0] data;
  } line_fill_t;

  function automatic logic [1:0] bank_of(input logic [31:0] a);
    return a[6:5];
  endfunction
  function automatic logic [2:0] set_of(input logic [31:0] a);
    return a[9:7];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [31:0] a);
    return a[31:10];
  endfunction
  function automatic logic [8:0] ram_index(input logic [31:0] a);
    return {a[14:7], a[4]};
  endfunction

  // Cluster arithmetic operations (encoding is this design's own).
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_SLT, ALU_SLTU
  } alu_op_t;

  // Multiply/divide operations.
  typedef enum logic [2:0] {
    MD_MUL16, MD_MUL, MD_MULU, MD_DIV, MD_DIVU
  } md_op_t;

  // A decoded cluster operation, as an execute-directive sequencer would
  // issue it from the AIB cache.
  typedef struct packed {
    logic        valid;
    logic        is_md;     // multiply/divide (cluster 3 only)
    alu_op_t     alu_op;
    md_op_t      md_op;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic        use_imm;
    logic [31:0] imm;
    logic [4:0]  rd;
    logic        wr;        // write the result to rd
  } cl_op_t;

  // A vector memory command (VLU / VSU).
  typedef struct packed {
    logic        unit;      // 1: unit-stride, 0: segment-strided
    logic [31:0] base;
    logic [31:0] stride;    // bytes between VPs (strided)
    logic [1:0]  esize;     // log2 of element bytes: 0,1,2
    logic [3:0]  nseg;      // elements per segment, 1..8
    logic [7:0]  vl;        // vector length
  } vcmd_t;

endpackage
