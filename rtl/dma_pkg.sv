// dma_pkg: types and constants shared by the two-slot DMA address engine.
//
// A DMA channel is described by four registers: SOURCE address, DESTINATION
// address, COUNT of remaining transfers (all 32 bits wide) and CONTROL. The
// CONTROL register carries three fields: Channel_No in bits 3:2, DRQ in bit 1
// and Enable in bit 0. These widths and bit positions follow the register
// formats of the design; keeping CONTROL at exactly four bits (no reserved
// upper bits) is this implementation's choice.
package dma_pkg;

  localparam int unsigned ADDR_W  = 32;  // SOURCE / DESTINATION width
  localparam int unsigned COUNT_W = 32;  // COUNT width
  localparam int unsigned CHNO_W  = 2;   // Channel_No field width (bits 3:2)

  // CONTROL register, bit 3 down to bit 0.
  typedef struct packed {
    logic [CHNO_W-1:0] channel_no;  // bits 3:2
    logic              drq;         // bit 1: the channel's data has arrived
    logic              enable;      // bit 0: channel may be considered for transfers
  } ctrl_t;

  // One channel's register values, as passed Engine -> Interface -> Counter.
  typedef struct packed {
    logic [ADDR_W-1:0]  src;
    logic [ADDR_W-1:0]  dst;
    logic [COUNT_W-1:0] count;
    ctrl_t              ctrl;
  } chan_t;

  localparam chan_t CHAN_EMPTY = '0;

  // SELECT_1 codes: bit 0 = Interface_1 holds a channel, bit 1 = Interface_2 does.
  localparam logic [1:0] SEL1_BOTH_EMPTY = 2'b00;
  localparam logic [1:0] SEL1_IF1_FULL   = 2'b01;
  localparam logic [1:0] SEL1_IF2_FULL   = 2'b10;
  localparam logic [1:0] SEL1_BOTH_FULL  = 2'b11;

endpackage
