// Shared types and constants of the tiled MPSoC emulation platform.
//
// The platform is made of processing tiles (processor core, power management
// unit, communication unit, local memories), a monitor tile that collects trace
// words from the tiles, and a shared memory tile reached over the network on
// chip. This package holds what several of those blocks use: the FSL word
// (32 data bits plus a control bit), the DTL memory-mapped initiator/target
// signal bundles, the command set of the connection DMA controller (CDMAC),
// the register map of the CDMAC and the system timer command bits.
//
// The FSL word layout and the frequency command layout (low 4 bits = N, upper
// 28 bits = effective time aligned to 16) follow the platform description.
// The DTL bundle is a reduced form of the DTL MMIO protocol (command, write and
// read groups with valid/accept handshakes); its exact field set, the CDMAC
// register map and the timer command bits are choices of this implementation.
package mpsoc_pkg;

  // Fast Simplex Link word: data plus the control bit.
  typedef struct packed {
    logic        ctrl;
    logic [31:0] data;
  } fsl_word_t;

  // DTL memory-mapped bundle, initiator to target.
  typedef struct packed {
    logic        cmd_valid;
    logic [31:0] cmd_addr;        // byte address
    logic        cmd_read;        // 1 = read, 0 = write
    logic [7:0]  cmd_block_size;  // number of words minus one
    logic        wr_valid;
    logic [31:0] wr_data;
    logic        wr_last;
    logic        rd_accept;
  } dtl_m2s_t;

  // DTL memory-mapped bundle, target to initiator.
  typedef struct packed {
    logic        cmd_accept;
    logic        wr_accept;
    logic        rd_valid;
    logic [31:0] rd_data;
    logic        rd_last;
  } dtl_s2m_t;

  // CDMAC transaction types (pseudo code of the controller usage).
  typedef enum logic [1:0] {
    OP_PCT_READ  = 2'd0,   // processor controlled read: remote -> read buffer
    OP_PCT_WRITE = 2'd1,   // processor controlled write: write buffer -> remote
    OP_DMA_READ  = 2'd2,   // DMA read: remote -> local memory
    OP_DMA_WRITE = 2'd3    // DMA write: local memory -> remote
  } cdmac_op_e;

  typedef struct packed {
    cdmac_op_e   op;
    logic [31:0] src;
    logic [31:0] dst;
    logic [15:0] len;      // words
  } cdmac_cmd_t;

  // CDMAC register offsets (word offsets within one controller).
  localparam logic [2:0] CDMAC_REG_SRC    = 3'd0;
  localparam logic [2:0] CDMAC_REG_DST    = 3'd1;
  localparam logic [2:0] CDMAC_REG_LEN    = 3'd2;
  localparam logic [2:0] CDMAC_REG_CMD    = 3'd3;
  localparam logic [2:0] CDMAC_REG_STATUS = 3'd4;
  localparam logic [2:0] CDMAC_REG_DATA   = 3'd5;

  // System timer command word (FSL control bit set).
  localparam int TMR_BIT_RUN    = 0;  // 1 = count, 0 = stop
  localparam int TMR_BIT_IRQEN  = 1;  // interrupt enable
  localparam int TMR_BIT_IRQCLR = 2;  // clear a pending interrupt

  // Frequency generator: fixed denominator and command layout.
  localparam int FREQ_D = 16;

  // Monitor packet header (upper half of the first word).
  localparam logic [15:0] MON_MAGIC = 16'hFFAA;

  // Processor-side signals of one processing tile, core to tile.
  typedef struct packed {
    logic        ilmb_en;
    logic [31:0] ilmb_addr;
    logic        dlmb_en;
    logic [3:0]  dlmb_we;
    logic [31:0] dlmb_addr;
    logic [31:0] dlmb_wdata;
    logic        bus_req;
    logic        bus_we;
    logic [5:0]  bus_addr;     // word address: [5:3] connection, [2:0] register
    logic [31:0] bus_wdata;
    logic        tmr_wr;
    fsl_word_t   tmr_data;
    logic        freq_wr;
    fsl_word_t   freq_data;
    logic        ungate_wr;
    fsl_word_t   ungate_data;
    logic        ltimer_clr;
    logic        mon_wr;       // trace FSL to the monitor (non-blocking)
    fsl_word_t   mon_data;
    logic        sync_rd;      // FSL from the monitor
  } cpu2tile_t;

  // Processor-side signals of one processing tile, tile to core.
  typedef struct packed {
    logic [31:0] ilmb_rdata;
    logic [31:0] dlmb_rdata;
    logic [31:0] bus_rdata;
    logic        tmr_full;
    logic        freq_full;
    logic        ungate_full;
    logic [31:0] timer_value;
    logic        irq;
    logic [31:0] local_time;
    logic        mon_full;
    fsl_word_t   sync_data;
    logic        sync_empty;
  } tile2cpu_t;

  // Monitor processor side.
  typedef struct packed {
    logic        mem_en;
    logic [3:0]  mem_we;
    logic [31:0] mem_addr;
    logic [31:0] mem_wdata;
  } moncpu_in_t;

endpackage
