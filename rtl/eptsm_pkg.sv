// eptsm_pkg: constants and record formats shared by the EPTSM read-out peripheral.
//
// The PMFE front-end chip delivers 64 channel states on eight serial wires of
// eight bits each. Sixteen channel servers watch four channels apiece. Each
// recorded transition travels through three record formats, built up stage by
// stage:
//   channel server : {UPDOWN, CHANNEL, TIMESTAMP}
//   FIFO server    : {UPDOWN, FIFO_DCI, CHANNEL, TIMESTAMP}
//   DMA handler    : {VALID, UPDOWN, DMA_DCI, FIFO_DCI, CHANNEL, TIMESTAMP}
// The field order and the 64-bit size of the final packet follow the design
// description. The field widths (6-bit channel id, 8-bit continuity counters,
// 40-bit timestamp) are this implementation's choice; they fill the 64 bits
// exactly.
package eptsm_pkg;

  localparam int NWIRES        = 8;                       // serial data wires from the PMFE
  localparam int BITS_PER_WIRE = 8;                       // channel bits serialized per wire
  localparam int NCHAN         = NWIRES * BITS_PER_WIRE;  // 64 channels
  localparam int CH_PER_SERVER = 4;                       // channels watched by one channel server
  localparam int NSERVERS      = NCHAN / CH_PER_SERVER;   // 16 channel servers
  localparam int DCLK_PER_FRAME = 5;                      // pulsed clock period in data clocks
  localparam int SLOTS         = 2 * DCLK_PER_FRAME;      // bit slots per frame (both data clock edges)
  localparam int SLOT_W        = 4;

  localparam int CH_W  = 6;
  localparam int TS_W  = 40;
  localparam int DCI_W = 8;

  typedef logic [CH_W-1:0]  chan_t;
  typedef logic [TS_W-1:0]  ts_t;
  typedef logic [DCI_W-1:0] dci_t;

  // Record written by a channel server into its local FIFO.
  typedef struct packed {
    logic  updown;     // new state of the channel: 1 = charge present (rising), 0 = falling
    chan_t channel;
    ts_t   timestamp;
  } cs_entry_t;

  // Record written by the FIFO server into the main FIFO.
  typedef struct packed {
    logic  updown;
    dci_t  fifo_dci;
    chan_t channel;
    ts_t   timestamp;
  } fifo_entry_t;

  // 64-bit word returned on the processor local bus.
  typedef struct packed {
    logic  valid;
    logic  updown;
    dci_t  dma_dci;
    dci_t  fifo_dci;
    chan_t channel;
    ts_t   timestamp;
  } packet_t;

  localparam int CS_ENTRY_W   = $bits(cs_entry_t);
  localparam int FIFO_ENTRY_W = $bits(fifo_entry_t);

  // Software register map (one 64-bit register per IPIF chip enable).
  localparam int NREGS      = 5;
  localparam int REG_CTRL   = 0;  // RW  control
  localparam int REG_MASK   = 1;  // RW  channel mask, 1 = channel ignored
  localparam int REG_RAW    = 2;  // RO  current 64-bit channel state
  localparam int REG_LOST   = 3;  // RO  lost transition count
  localparam int REG_STATUS = 4;  // RO  main FIFO occupancy and flags

  // Layout of the control register.
  typedef struct packed {
    logic [15:0] cal_period;   // [63:48] calibration pulse period in data clocks
    logic [15:0] cal_count;    // [47:32] pulses per calibration burst
    logic [23:0] reserved;     // [31:8]
    logic [3:0]  align;        // [7:4]   deserializer phase offset in bit slots
    logic        reserved0;    // [3]
    logic        cal_type;     // [2]     0 = burst of cal_count pulses, 1 = continuous
    logic        cal_enable;   // [1]     calibration mode on (rising edge starts a burst)
    logic        run;          // [0]     data acquisition running
  } ctrl_t;

endpackage
