// ndp_pkg: types and constants shared by the near-data processor.
//
// The processor sits beside a 512 KB L2 made of four memories (MEM0..MEM3), each
// built from 16 cuts of 2048 x 32 bit, so one memory row is 16 lanes x 32 bit =
// 512 bit and one lane feeds one processing element (PE). Sixteen PEs are paired
// into eight dual processing element units (DPEUs).
//
// The configuration ("context") is one 512-bit row of MEM3. Its field list follows
// the three-level hierarchy of the design (PE-array level, mode level, PE level);
// the bit positions and the encodings are this design's own. All count fields use
// a "value minus one" encoding so that the full ranges of the specification
// (kernel 1-16, stride 1-8, channels 1-256, FC lengths 1-4096) fit the field widths.
package ndp_pkg;

  localparam int unsigned NLANES   = 16;          // PEs = cuts per memory
  localparam int unsigned NDPEU    = NLANES / 2;  // DPEUs
  localparam int unsigned NMEM     = 4;           // memories
  localparam int unsigned WORD_W   = 32;          // cut word width
  localparam int unsigned ROW_W    = 11;          // row address width (2048 rows per cut)
  localparam int unsigned ELEM_W   = ROW_W + 2;   // element offset (up to 4 bytes per word)
  localparam int unsigned CFG_W    = NLANES * WORD_W; // 512-bit context row
  localparam int unsigned MAXSKEW  = NLANES - 1;  // deepest systolic delay

  // Operating modes (mode level)
  typedef enum logic [1:0] {
    MODE_CONV      = 2'd0,
    MODE_CONV_POOL = 2'd1,
    MODE_FC        = 2'd2,
    MODE_GP        = 2'd3
  } mode_e;

  // PE datapath pattern (datapath_config)
  typedef enum logic [1:0] {
    DP_MAC = 2'd0,   // accumulate a*b onto the partial sum
    DP_MUL = 2'd1,   // a*b
    DP_ALU = 2'd2,   // a <op> b
    DP_SED = 2'd3    // accumulate (a-b)^2
  } dp_e;

  // ALU operation (opcode) used by DP_ALU
  typedef enum logic [3:0] {
    OP_ADD = 4'd0,
    OP_SUB = 4'd1,
    OP_AND = 4'd2,
    OP_OR  = 4'd3,
    OP_XOR = 4'd4,
    OP_MAX = 4'd5,
    OP_MIN = 4'd6,
    OP_NOT = 4'd7,   // ~a
    OP_SHL = 4'd8,   // a << b[2:0]
    OP_SHR = 4'd9    // a >>> b[2:0]
  } op_e;

  // Context row. First member is the most significant; pad keeps 512 bits.
  typedef struct packed {
    logic [301:0] pad;
    // GP mode
    logic [11:0] len_b;        // minus one
    logic [11:0] len_a;        // minus one
    logic [11:0] loop_b;       // minus one
    logic [11:0] loop_a;       // minus one
    // FC mode
    logic [11:0] out_len;      // minus one
    logic [11:0] in_len;       // minus one
    // pooling
    logic [2:0]  pool_stride;  // minus one
    logic [3:0]  pool_kernel;  // minus one
    logic [7:0]  pool_col_size;// minus one (conv output columns)
    logic [7:0]  pool_row_size;// minus one (conv output rows)
    // CONV mode
    logic        relu_en;
    logic [2:0]  stride;       // minus one
    logic [3:0]  kernel_size;  // minus one
    logic [7:0]  column_size;  // minus one (ifmap row length, see agu_conv_pool)
    logic [7:0]  row_size;     // minus one
    logic [7:0]  cho;          // minus one
    logic [7:0]  chi;          // minus one
    // PE level
    logic [4:0]  shift_param;  // arithmetic right shift of results
    logic [3:0]  opcode;
    logic [1:0]  datapath;
    logic        data_width;   // 0: 8-bit, 1: 16-bit (DPEU mode)
    // PE-array level
    logic [ROW_W-1:0] addr_psum_start;
    logic [ROW_W-1:0] addr_b_start;
    logic [ROW_W-1:0] addr_a_start;
    logic [7:0]  xbar_config;  // {res_mem, psum_mem, b_mem, a_mem}, 2 bit each
    logic [2:0]  assoc;        // log2 of the set size (0..4)
    logic [15:0] pe_en;
    logic        sys_en;
    logic [1:0]  mode;
  } ctx_t;

  // One issue slot of the address generators (element offsets, not rows).
  typedef struct packed {
    logic              valid;
    logic [ELEM_W-1:0] a_off;      // element offset into input A
    logic [ELEM_W-1:0] b_off;      // element offset into input B
    logic [ROW_W-1:0]  p_off;      // row offset into Psum
    logic              first;      // first beat of an accumulation
    logic              last;       // last beat: a result leaves the PE
    logic              pool_first; // first result of a pooling window
    logic              pool_last;  // last result of a pooling window
  } beat_t;

  // Per-lane side information that travels with the data through the NDPU.
  typedef struct packed {
    logic first;
    logic last;
    logic pool_first;
    logic pool_last;
  } tag_t;

  // Operands of one lane as delivered to a PE (after subword selection)
  typedef struct packed {
    logic        valid;
    tag_t        tag;
    logic [15:0] a;
    logic [15:0] b;
    logic [31:0] psum;
  } lane_in_t;

  // One lane result
  typedef struct packed {
    logic        valid;
    logic        pool_first;
    logic        pool_last;
    logic [31:0] data;
  } lane_out_t;

  // Memory-side request of one NDPU port
  typedef struct packed {
    logic                 en;
    logic                 we;
    logic [ROW_W-1:0]     row;
    logic [NLANES-1:0]    lane_we;
    logic [CFG_W-1:0]     wdata;
  } mreq_t;

endpackage
