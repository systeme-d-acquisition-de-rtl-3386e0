// cali_pkg: constants and types shared by the acquisition blocks.
//
// The buffer handshake is a status word kept at word address 0 of each
// packet BRAM: the readout writes BRAM_FULL there once a packet is complete,
// the processor writes BRAM_FREE back once it has read the packet. The
// numeric codes, the header layout and the error codes are this design's
// own choices; the names follow the ping-pong manager they serve.
package cali_pkg;

  // Status word values (word 0 of a packet buffer).
  localparam logic [31:0] BRAM_FREE = 32'h0000_0000;
  localparam logic [31:0] BRAM_FULL = 32'h0000_0001;

  // Codes latched in the ping-pong manager's error register.
  localparam logic [31:0] ERR_NONE           = 32'h0000_0000;
  localparam logic [31:0] ERR_WR_BRAM_0_FULL = 32'h0000_0001;
  localparam logic [31:0] ERR_WR_BRAM_1_FULL = 32'h0000_0002;

  // Packet header: word 0 status, word 1 packet number, words 2/3 timestamp
  // of the first sample (low, high). Sample words follow.
  localparam int unsigned HDR_WORDS   = 4;
  localparam int unsigned HDR_STATUS  = 0;
  localparam int unsigned HDR_PKTNUM  = 1;
  localparam int unsigned HDR_TS_LO   = 2;
  localparam int unsigned HDR_TS_HI   = 3;

  // States of the ping-pong manager.
  typedef enum logic [2:0] {
    STATE_BRAM_0,
    STATE_BRAM_READ_STATUS_PIPE_0,
    STATE_BRAM_WAIT_FREE_1,
    STATE_BRAM_1,
    STATE_BRAM_READ_STATUS_PIPE_1,
    STATE_BRAM_WAIT_FREE_0
  } bram_state_e;

  // One 32-bit sample word: two 16-bit offset-binary samples.
  typedef struct packed {
    logic [15:0] hi;
    logic [15:0] lo;
  } sample_word_t;

endpackage
