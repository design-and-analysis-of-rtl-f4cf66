// rm_pkg: sizes, request/reply packet types and configuration layouts shared
// by the reconfigurable memory system.
//
// The sizes are those of the prototype mat: 512 words of 32 data bits, each
// with 4 meta-data bits, a 2-bit ext_in/ext_out link to the inter-mat control
// network, 11-bit pointers (two more bits than a word address, so a FIFO can
// span four mats), four pointers with 4-bit strides, and a 16-term PLA with
// 6 inputs and 4 outputs. The opcode encoding, the configuration address map
// and the register layouts are choices of this design; the document leaves
// them open.
package rm_pkg;

  // ---- mat geometry ------------------------------------------------------
  localparam int unsigned D        = 32;   // main data bits per word
  localparam int unsigned M        = 4;    // meta-data bits per word
  localparam int unsigned AW       = 9;    // word address bits (512 words)
  localparam int unsigned WORDS    = 1 << AW;
  localparam int unsigned E        = 2;    // ext_in / ext_out bits
  localparam int unsigned NBUS     = 4;    // inter-mat control buses

  // ---- pointer logic -----------------------------------------------------
  localparam int unsigned NPTR     = 4;
  localparam int unsigned PTR_W    = 11;
  localparam int unsigned STRIDE_W = 4;
  localparam int unsigned RANGE_W  = PTR_W - AW;  // 2 extra bits: up to 4 mats

  // ---- reconfigurable PLA ------------------------------------------------
  localparam int unsigned PLA_TERMS = 16;
  localparam int unsigned PLA_NIN   = 6;        // {ext, match, md[3:0]}
  localparam int unsigned PLA_NOUT  = M;
  localparam int unsigned PLA_ROW_W = 2 * PLA_NIN + PLA_NOUT;  // {sram, o, z}

  // ---- mat latency (cycles from mat input to registered mat output) ------
  localparam int unsigned MAT_LAT = 2;

  // ---- configuration address map (cfg_read / cfg_write address field) ----
  localparam logic [AW-1:0] CFG_PTR0   = 9'd0;   // 0..3  pointer values
  localparam logic [AW-1:0] CFG_STR0   = 9'd4;   // 4..7  strides
  localparam logic [AW-1:0] CFG_PLA0   = 9'd16;  // 16..31 PLA rows
  localparam logic [AW-1:0] CFG_MATCTL = 9'd32;  // mat control register
  localparam logic [AW-1:0] CFG_IMCN   = 9'd33;  // IMCN driver/receiver register

  // ---- pre-decoded opcode --------------------------------------------------
  // Exactly one of the five base operations is set; the modifiers follow
  // Table 3.1 (cmp and rmw on reads, ptr on reads and writes, conditions on
  // any operation). icond: internal condition (meta-data pattern match);
  // xcond: external condition from the inter-mat control network.
  typedef struct packed {
    logic rd;
    logic wr;
    logic gang;
    logic cfg_rd;
    logic cfg_wr;
    logic cmp;
    logic ptr;
    logic rmw;
    logic icond;
    logic xcond;
  } opcode_t;

  // Mat request payload: 10 + 9 + 5 + 4 + 32 = 60 bits.
  typedef struct packed {
    opcode_t        op;
    logic [AW-1:0]  addr;     // word address, or pointer / gang / cfg specifier
    logic [M:0]     mask;     // [0]: main data chunk, [i+1]: meta-data bit i
    logic [M-1:0]   mdata;
    logic [D-1:0]   data;
  } payload_t;

  typedef struct packed {
    logic     valid;
    payload_t p;
  } mat_req_t;

  // Mat output / reply packet (Table 4.2).
  typedef struct packed {
    logic [D-1:0] data;
    logic [M-1:0] mdata;
    logic         valid;
    logic         match;
    logic         complete;
  } reply_t;

  // Pointer operation specifier carried in the address field.
  typedef struct packed {
    logic [AW-5:0] unused;
    logic          sub;       // 1: pointer -= stride, 0: pointer += stride
    logic          upd;       // write the updated pointer back
    logic [1:0]    num;       // pointer number
  } ptr_spec_t;

  // ---- configuration registers -------------------------------------------
  // ext_out source codes
  localparam logic [2:0] XO_NONE = 3'd0, XO_MATCH = 3'd1, XO_VALID = 3'd2,
                         XO_COMPLETE = 3'd3, XO_MD0 = 3'd4;  // 4..7: mdata[0..3]

  typedef struct packed {
    logic [E-1:0][2:0]    xo_sel;      // ext_out[i] source
    logic                 pla_ext_sel; // which ext_in bit feeds the PLA
    logic                 xcond_sel;   // which ext_in bit is the external condition
    logic                 range_en;    // range-check the upper pointer bits
    logic [RANGE_W-1:0]   range_id;    // this mat's slice of a multi-mat FIFO
  } matctl_t;                          // 11 bits

  typedef struct packed {
    logic [NBUS-1:0]            link;      // join bus b to the next mat's segment
    logic [E-1:0][1:0]          in_bus;    // ext_in[i] taken from bus in_bus[i]
    logic [E-1:0][1:0]          drv_bus;   // ext_out[i] drives bus drv_bus[i] ...
    logic [E-1:0]               drv_en;    // ... when drv_en[i]
  } imcn_cfg_t;                            // 14 bits

  // ---- processor interconnect ----------------------------------------------
  // Schedule kept per mat by the request crossbar for the reply crossbar.
  typedef struct packed {
    logic       valid;
    logic       reply;
    logic [7:0] port;
  } sched_t;

  // ---- processor interface ------------------------------------------------
  localparam int unsigned VA_W   = 32;  // processor (virtual) address bits
  localparam int unsigned LMID_W = 3;   // logical memory ID: top address bits

  typedef struct packed {
    logic             valid;
    logic             reply;      // the request returns data
    logic             hw_direct;  // va holds {mat_mask, mat_id, mat_addr}
    logic [VA_W-1:0]  va;
    opcode_t          op;
    logic [M:0]       mask;
    logic [M-1:0]     mdata;
    logic [D-1:0]     data;
  } proc_req_t;

  // One address splitter table entry (one per logical memory ID and port).
  // mat ID   = id_base   + ((va >> id_shift)   & (2^id_bits   - 1))
  // mat addr = addr_base + ((va >> addr_shift) & (2^addr_bits - 1))
  // data     = tag_en ? va >> tag_shift : request data
  typedef struct packed {
    logic [7:0]    id_base;
    logic [7:0]    id_mask;
    logic [4:0]    id_shift;
    logic [3:0]    id_bits;
    logic [AW-1:0] addr_base;
    logic [4:0]    addr_shift;
    logic [3:0]    addr_bits;
    logic          tag_en;
    logic [4:0]    tag_shift;
  } split_entry_t;

endpackage
