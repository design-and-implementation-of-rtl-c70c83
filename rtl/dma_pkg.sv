// dma_pkg: constants, types and helper functions shared by the ECC DMA
// controller.
//
// The data path is one byte wide. Each byte is stored as a SECDED codeword:
// an extended Hamming code with four Hamming check bits for eight data bits
// and one overall parity bit, thirteen bits in all. The burst length of four
// words and the two mode encodings (01 single, 10 burst) follow the
// controller's flow chart; the 4-bit word address and the register map are
// choices of this implementation.
package dma_pkg;

  // Default sizes.
  localparam int unsigned DEF_DATA_W    = 8;  // data word width
  localparam int unsigned DEF_ADDR_W    = 4;  // memory word address width
  localparam int unsigned DEF_BURST_LEN = 4;  // words moved by one burst

  // Number of Hamming check bits for a data width: smallest p with
  // 2**p >= dw + p + 1 (4 for 8-bit data).
  function automatic int unsigned ecc_parity_bits(input int unsigned dw);
    int unsigned p;
    p = 0;
    while ((1 << p) < dw + p + 1) p++;
    return p;
  endfunction

  // Codeword width: data bits, Hamming check bits and the overall parity bit.
  function automatic int unsigned ecc_cw_w(input int unsigned dw);
    return dw + ecc_parity_bits(dw) + 1;
  endfunction

  // Transfer mode field.
  typedef enum logic [1:0] {
    MODE_NONE   = 2'b00,
    MODE_SINGLE = 2'b01,
    MODE_BURST  = 2'b10,
    MODE_RSVD   = 2'b11
  } dma_mode_e;

  // Controller states.
  typedef enum logic [2:0] {
    S_IDLE     = 3'd0,  // wait for a request
    S_ACK      = 3'd1,  // acknowledge, check mode and address range
    S_WRITE    = 3'd2,  // write one codeword per cycle
    S_COMPLETE = 3'd3,  // signal transfer done
    S_VERIFY   = 3'd4   // read back and check the written codewords
  } dma_state_e;

  // Register map of the control and status registers.
  localparam logic [1:0] CSR_CTRL   = 2'd0;  // [1:0] mode, [2] irq enable, [7] start
  localparam logic [1:0] CSR_ADDR   = 2'd1;  // destination word address
  localparam logic [1:0] CSR_STATUS = 2'd2;  // flags, write 1 to clear

  // STATUS bit positions.
  localparam int unsigned ST_DONE     = 0;
  localparam int unsigned ST_SINGLE   = 1;
  localparam int unsigned ST_DOUBLE   = 2;
  localparam int unsigned ST_ADDR_ERR = 3;
  localparam int unsigned ST_MODE_ERR = 4;
  localparam int unsigned ST_BUSY     = 7;

endpackage
