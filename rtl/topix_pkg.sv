// topix_pkg: types, sizes and helper functions shared by the ToPiX v4 readout blocks.
//
// The numbers that come from the ToPiX v4 description are the 12-bit time stamp, the
// four double columns of 2x32, 2x128, 2x128 and 2x32 pixels, and the 32-word column FIFOs.
// The pixel address width, the configuration word layout, the hit word layout and the
// output frame format are this design's own choices; they are gathered here so every
// block agrees on them.
package topix_pkg;

  localparam int unsigned TS_W       = 12;  // time stamp width (leading/trailing edge registers)
  localparam int unsigned CFG_W      = 12;  // pixel configuration word (loaded through te_reg)
  localparam int unsigned ADDR_W     = 8;   // pixel address in a double column: {side, row[6:0]}
  localparam int unsigned NCOL       = 4;   // double columns in the prototype
  localparam int unsigned FIFO_DEPTH = 32;  // words per column FIFO
  localparam int unsigned NPIX       = 640; // pixels in the prototype

  // Pixel configuration bits. Bit 0 masks the pixel, bit 1 enables test-pulse injection,
  // bits 11:2 are the threshold fine-tuning code passed to the pixel DAC.
  localparam int unsigned CFG_MASK_BIT = 0;
  localparam int unsigned CFG_TEST_BIT = 1;

  // One hit as stored in a column FIFO: pixel address, then leading and trailing edge
  // time stamps in binary (already Gray decoded).
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [TS_W-1:0]   le;
    logic [TS_W-1:0]   te;
  } hit_t;
  localparam int unsigned HIT_W = $bits(hit_t);  // 32

  // Output frame: 4-bit header and 36-bit payload, 40 bits sent two per clock cycle.
  localparam int unsigned FRAME_W = 40;
  typedef enum logic [3:0] {
    HDR_IDLE = 4'b0101,
    HDR_DATA = 4'b1010,
    HDR_CFG  = 4'b1100
  } frame_hdr_e;

  // Serial configuration commands (32 bits: op[31:30], col[29:28], addr[27:20],
  // spare[19:12], data[11:0]).
  typedef enum logic [1:0] {
    OP_MODE   = 2'b00,  // data[0] = 1 selects data taking, 0 configuration
    OP_CFG_WR = 2'b01,  // write data[11:0] into the configuration register of a pixel
    OP_CFG_RD = 2'b10,  // read back the configuration register of a pixel
    OP_NOP    = 2'b11
  } cfg_op_e;

  typedef struct packed {
    cfg_op_e          op;
    logic [1:0]       col;
    logic [ADDR_W-1:0] addr;
    logic [7:0]       spare;
    logic [CFG_W-1:0] data;
  } cfg_cmd_t;

  // Rows of each double column of the prototype (each double column holds 2*rows pixels).
  function automatic int unsigned col_rows(int unsigned col);
    return (col == 0 || col == NCOL - 1) ? 32 : 128;
  endfunction

  // Index of the first pixel of a double column in the global 0..639 numbering.
  function automatic int unsigned col_base(int unsigned col);
    int unsigned b = 0;
    for (int unsigned i = 0; i < col; i++) b += 2 * col_rows(i);
    return b;
  endfunction

  function automatic logic [TS_W-1:0] bin2gray(logic [TS_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [TS_W-1:0] gray2bin(logic [TS_W-1:0] g);
    logic [TS_W-1:0] b;
    b[TS_W-1] = g[TS_W-1];
    for (int i = TS_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Hamming(17,12) single-error-correcting code used for the SEU protected registers of
  // the second half of the matrix. Code word bit i holds code position i+1; the parity
  // bits sit at positions 1, 2, 4, 8 and 16, the data bits d[0..11] fill positions 3, 5,
  // 6, 7, 9..15 and 17 in order. HAM_MASK[j] selects the positions whose number has bit j
  // set; each parity bit makes the XOR over its mask zero.
  localparam logic [4:0][16:0] HAM_MASK = '{17'h18000, 17'h07f80, 17'h07878, 17'h06666, 17'h15555};

  function automatic logic [16:0] ham_place(logic [11:0] d);
    return {d[11], 1'b0, d[10:4], 1'b0, d[3:1], 1'b0, d[0], 2'b00};
  endfunction

  function automatic logic [4:0] ham_syndrome(logic [16:0] cw);
    return {^(cw & HAM_MASK[4]), ^(cw & HAM_MASK[3]), ^(cw & HAM_MASK[2]),
            ^(cw & HAM_MASK[1]), ^(cw & HAM_MASK[0])};
  endfunction

  function automatic logic [16:0] ham_encode(logic [11:0] d);
    logic [16:0] c;
    logic [4:0]  p;
    c = ham_place(d);
    p = ham_syndrome(c);
    return c | {1'b0, p[4], 7'b0, p[3], 3'b0, p[2], 1'b0, p[1], p[0]};
  endfunction

  // Decodes a Hamming(17,12) word, correcting a single flipped bit: a non-zero syndrome
  // is the position of the flipped bit.
  function automatic logic [11:0] ham_decode(logic [16:0] cw);
    logic [4:0]  syn;
    logic [16:0] c;
    syn = ham_syndrome(cw);
    c   = cw;
    if (syn != 5'd0 && syn <= 5'd17) c = cw ^ (17'd1 << (syn - 5'd1));
    return {c[16], c[14:8], c[6:4], c[2]};
  endfunction

endpackage
