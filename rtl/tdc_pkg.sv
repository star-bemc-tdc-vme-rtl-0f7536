// tdc_pkg: types and constants shared by the TDC crate cards.
//
// Every card turns a VME cycle into one request on an internal register
// bus ("local bus"). A request carries the byte address bits 7..1 inside
// the card's 256-byte window, the two VME byte strobes and the write data;
// the addressed register block answers with a one-cycle ack that carries
// the read data. A request is held until it is acknowledged, so a block
// may take as long as it needs (a RAM cycle, a CCLK pulse).
//
// Byte lanes follow VME: the even byte address is the most significant
// byte (D15..D8, byte enable be[1]), the odd byte address the least
// significant byte (D7..D0, be[0]).
package tdc_pkg;

  typedef struct packed {
    logic        valid;   // request pending (held until ack)
    logic        we;      // 1 = write, 0 = read
    logic [7:1]  addr;    // word address inside the card's 256-byte window
    logic [1:0]  be;      // be[1] even byte D15..D8, be[0] odd byte D7..D0
    logic [15:0] wdata;
  } lbus_req_t;

  typedef struct packed {
    logic        ack;     // one-cycle completion strobe
    logic [15:0] rdata;   // valid with ack
  } lbus_rsp_t;

  localparam lbus_rsp_t LBUS_RSP_IDLE = '{ack: 1'b0, rdata: 16'h0000};

  // VME A16 address modifiers accepted by the cards
  localparam logic [5:0] AM_A16_USER = 6'h29;
  localparam logic [5:0] AM_A16_SUPV = 6'h2D;

  // Input Card channel register index (byte offset / 2 inside a 0x20 window)
  typedef enum logic [3:0] {
    CH_TEST_TOKEN   = 4'h0,   // BC+00
    CH_DAQ_TOKEN    = 4'h1,   // BC+02
    CH_L2_TOKEN     = 4'h2,   // BC+04
    CH_RXW_TOKEN    = 4'h3,   // BC+06
    CH_TEST_COUNT   = 4'h4,   // BC+08  wr: RAM@TEST -> TEST buffer
    CH_DAQ_COUNT    = 4'h5,   // BC+0A  wr: RAM@DAQ  -> HOLD buffer
    CH_L2_COUNT     = 4'h6,   // BC+0C  wr: RAM@L2   -> HOLD buffer
    CH_RXW_COUNT    = 4'h7,   // BC+0E  wr: TEST buffer -> RAM@TEST, rd: RXWRITE counter
    CH_TEST_BUF     = 4'h8,   // BC+10
    CH_FPGA_MASK    = 4'hE,   // BC+1C  handled by the card, mirrored in every window
    CH_FPGA_DATA    = 4'hF    // BC+1E
  } ch_reg_e;

  // Output Card register word addresses (byte offset / 2)
  localparam logic [7:1] OC_TRIG_WORD  = 7'h20;  // B+40
  localparam logic [7:1] OC_TOKEN      = 7'h21;  // B+42
  localparam logic [7:1] OC_L2_NEXT    = 7'h22;  // B+44
  localparam logic [7:1] OC_DAQ_NEXT   = 7'h23;  // B+46
  localparam logic [7:1] OC_L2_TOKEN   = 7'h24;  // B+48
  localparam logic [7:1] OC_DAQ_TOKEN  = 7'h25;  // B+4A
  localparam logic [7:1] OC_L2_TRIG    = 7'h26;  // B+4C
  localparam logic [7:1] OC_DAQ_TRIG   = 7'h27;  // B+4E
  localparam logic [7:1] OC_FPGA_MASK  = 7'h7E;  // B+FC
  localparam logic [7:1] OC_FPGA_DATA  = 7'h7F;  // B+FE

  // One stored trigger: trigger command, DAQ command, token number
  typedef struct packed {
    logic [3:0]  trg_cmd;
    logic [3:0]  daq_cmd;
    logic [11:0] token;
  } trig_entry_t;

  // Merge a byte-enabled write into a 16-bit register value
  function automatic logic [15:0] merge_bytes(input logic [15:0] old_v,
                                              input logic [15:0] new_v,
                                              input logic [1:0]  be);
    merge_bytes = old_v;
    if (be[1]) merge_bytes[15:8] = new_v[15:8];
    if (be[0]) merge_bytes[7:0]  = new_v[7:0];
  endfunction

endpackage
