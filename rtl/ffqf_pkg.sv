// Shared types and constants of the qualification template.
//
// The template moves all communication between subsystems onto a memory
// mapped AXI4 bus with 32-bit data (five independent valid/ready channels:
// AR, R, AW, W, B). A whole bus is carried as two packed structs: axi_req_t
// holds everything the master drives, axi_resp_t everything the slave side
// drives. Identifiers, lock, cache, prot, QoS and user signals are left out
// because every bus in the template has a single master with at most one
// transaction in flight per direction; this is a choice of this design.
// Bursts are INCR with 32-bit beats; len is the AXI encoding (beats - 1).
//
// The package also holds the end marker of a copy schedule (0xDEADBEEF), the
// compare types of the monitor match units and the state encodings that the
// monitor reports in its 8-bit status register.
package ffqf_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;

  // Burst encodings and responses (AXI4)
  localparam logic [1:0] BURST_FIXED = 2'b00;
  localparam logic [1:0] BURST_INCR  = 2'b01;
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] RESP_DECERR = 2'b11;
  localparam logic [2:0] SIZE_4B     = 3'b010;

  // Largest burst the template issues (beats)
  localparam int unsigned MAX_BURST = 16;

  // End of a copy schedule in the arbiter configuration memory
  localparam logic [31:0] SCHED_END = 32'hDEAD_BEEF;

  // Address or control channel (AR or AW)
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [7:0]        len;
    logic [2:0]        size;
    logic [1:0]        burst;
  } axi_ax_t;

  // Signals driven by a master
  typedef struct packed {
    logic              aw_valid;
    axi_ax_t           aw;
    logic              w_valid;
    logic [DATA_W-1:0] w_data;
    logic [STRB_W-1:0] w_strb;
    logic              w_last;
    logic              b_ready;
    logic              ar_valid;
    axi_ax_t           ar;
    logic              r_ready;
  } axi_req_t;

  // Signals driven by a slave
  typedef struct packed {
    logic              aw_ready;
    logic              w_ready;
    logic              b_valid;
    logic [1:0]        b_resp;
    logic              ar_ready;
    logic              r_valid;
    logic [DATA_W-1:0] r_data;
    logic [1:0]        r_resp;
    logic              r_last;
  } axi_resp_t;

  // Compare types of a match unit
  typedef enum logic [1:0] {
    CMP_EQ = 2'b00,
    CMP_NE = 2'b01,
    CMP_LT = 2'b10,
    CMP_GT = 2'b11
  } cmp_t;

  // Monitor type field of the control register
  typedef enum logic [1:0] {
    MON_NONE     = 2'b00,
    MON_AXI      = 2'b01,
    MON_PARALLEL = 2'b10,
    MON_RSVD     = 2'b11
  } mon_type_t;

  // Configuration-memory reader states
  typedef enum logic [1:0] {
    CFG_IDLE  = 2'b00,
    CFG_WAIT  = 2'b01,
    CFG_STORE = 2'b10,
    CFG_DONE  = 2'b11
  } cfg_state_t;

  // Parallel-register acquisition states
  typedef enum logic [1:0] {
    PAR_IDLE      = 2'b00,
    PAR_WAIT_DATA = 2'b01,
    PAR_TRIGGERED = 2'b10,
    PAR_DONE      = 2'b11
  } par_state_t;

  // AXI acquisition states
  typedef enum logic [2:0] {
    AXM_IDLE         = 3'b000,
    AXM_WAIT_ADDRESS = 3'b001,
    AXM_WAIT_DATA    = 3'b010,
    AXM_TRIGGERED    = 3'b011,
    AXM_DONE         = 3'b100
  } axm_state_t;

  // Control register bit positions
  localparam int unsigned CTRL_READCFG = 2;
  localparam int unsigned CTRL_RESET   = 3;
  localparam int unsigned CTRL_ENABLE  = 4;
  localparam int unsigned CTRL_CAPTURE = 5;
  localparam int unsigned CTRL_BREAK   = 6;

  // Number of 32-bit words in the monitor configuration record
  localparam int unsigned MON_CFG_WORDS = 8;

endpackage
