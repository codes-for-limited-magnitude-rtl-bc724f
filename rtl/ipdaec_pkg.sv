// ipdaec_pkg: sizes, code matrix and cell layout shared by the IP-DAEC
// encoder, decoder and the protected multilevel-cell (MLC) memory.
//
// IP-DAEC protects a data word stored in b-bit MLC cells against one cell
// whose level has moved by up to 3 levels in either direction. With binary
// level-to-bit mapping such an error always flips the lowest and/or the
// second lowest bit of the cell. The two low bits of every data cell are
// therefore protected by a SEC-DAEC code (single error correction, double
// adjacent error correction): its syndrome names the faulty cell and the
// pattern on its two low bits. The upper b-2 bits of the cells are covered by
// b-2 interleaved parity (IP) bits, whose syndrome gives the pattern on the
// upper bits of that same cell.
//
// Configuration: 32 data bits in 3-bit cells, the main example of the
// design. Word layout (cell 0 is the least significant):
//   data cell c (0..9)  : {d[3c+2], d[3c+1], d[3c]}   (bit 2 = upper bit)
//   data cell 10        : {p_ip, d[31], d[30]}
//   parity cell 11      : {p3, p2, p1}                 (p1 = lowest bit)
//   parity cell 12      : {p6, p5, p4}
// Data bits are numbered from 0 here; d[0] is the document's d1.
// Storing three SEC-DAEC parity bits per cell (13 cells per word instead of
// 14) is allowed because the H matrix below gives every error confined to a
// parity cell a syndrome that differs from every correctable data-cell error.
//
// SEC-DAEC code: (28,22) with H = [I6 | P]. The 22 protected bits
// u[0..21] are the two low bits of data cells 0..10 in order:
// u[2c] = lowest bit of cell c, u[2c+1] = second lowest bit.
// H_DATA[r][j] is the entry of row r+1, column 7+j of the H matrix.
// The matrix meets the three rules the scheme needs: the 22 single-bit
// syndromes and the 11 in-cell double-adjacent syndromes are 33 distinct
// non-zero values, and no error confined to one parity cell (any non-empty
// subset of {p1,p2,p3} or {p4,p5,p6}) produces one of them.
package ipdaec_pkg;

  localparam int unsigned DATA_W   = 32;  // data bits per word
  localparam int unsigned BPC      = 3;   // bits per MLC cell
  localparam int unsigned N_IP     = BPC - 2;              // IP bits
  localparam int unsigned N_DCELLS = (DATA_W + N_IP + BPC - 1) / BPC;  // 11
  localparam int unsigned SD_K     = 2 * N_DCELLS;         // SEC-DAEC data bits (22)
  localparam int unsigned SD_R     = 6;                    // SEC-DAEC parity bits
  localparam int unsigned N_PCELLS = (SD_R + BPC - 1) / BPC;  // 2
  localparam int unsigned N_CELLS  = N_DCELLS + N_PCELLS;  // 13
  localparam int unsigned IP_K     = DATA_W - SD_K;        // data bits in upper slots (10)

  typedef logic [BPC-1:0]             cell_t;
  typedef logic [N_CELLS-1:0][BPC-1:0] codeword_t;
  typedef logic [DATA_W-1:0]          data_t;
  typedef logic [SD_R-1:0]            sd_syn_t;
  typedef logic [N_IP-1:0]            ip_syn_t;

  // P part of the (28,22) H matrix; row r, bit j = column 7+j.
  typedef logic [SD_R-1:0][SD_K-1:0] hmat_t;
  localparam hmat_t H_DATA = '{
    22'b1000101101110101011011,  // row 6
    22'b0111001111101011000101,  // row 5
    22'b1110010111100110100010,  // row 4
    22'b1000110110101100010101,  // row 3
    22'b0111110000011001101010,  // row 2
    22'b1010101011100010111100   // row 1
  };

  // What the decoder found, for monitoring.
  typedef enum logic [1:0] {
    DEC_CLEAN       = 2'd0,  // all syndromes zero
    DEC_CORRECTED   = 2'd1,  // a data cell was located and corrected
    DEC_PARITY_CELL = 2'd2,  // error confined to a SEC-DAEC parity cell
    DEC_UNCORR      = 2'd3   // error detected, data not correctable
  } dec_status_t;

  // Data bit stored at bit b of data cell c (or DATA_W + i for IP bit i).
  function automatic int unsigned slot_index(input int unsigned c, input int unsigned b);
    return c * BPC + b;
  endfunction

endpackage
