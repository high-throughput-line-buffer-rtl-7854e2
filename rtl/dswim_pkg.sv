// dswim_pkg: constants and helper functions shared by the D-SWIM line
// buffer modules.
//
// A pixel is one byte. Every BRAM is used in simple dual-port mode with a
// 64-bit port and a byte-wise write enable, so one BRAM word holds eight
// pixels; the depth is 512 words (the 36 Kbit block of the target family).
//
// The instruction word is 32 bits. Its five fields are packed from bit 0
// upwards in the order START, OFFSET, REMAIN, CYCLE, RETURN; the field widths
// follow the bit-length rules of the instruction format (ceil(log2(.)) of the
// range of each field), except that CYCLE is given one bit more when needed
// so that a full-width line (N_line_max / N_blk blocks) can be encoded.
package dswim_pkg;

  localparam int unsigned PIX_W   = 8;              // bits per pixel
  localparam int unsigned W_BRAM  = 64;             // BRAM port width (bits)
  localparam int unsigned D_BRAM  = 512;            // BRAM depth (words)
  localparam int unsigned PPW     = W_BRAM / PIX_W; // pixels per BRAM word
  localparam int unsigned INSTR_W = 32;             // instruction word width

  // Number of BRAMs per line buffer: the larger of the capacity bound and the
  // port-width bound (a block plus the worst in-word offset must touch every
  // BRAM at most once).
  function automatic int unsigned calc_nbram(int unsigned nline_max, int unsigned nblk);
    int unsigned by_cap, by_width;
    by_cap   = (nline_max + nblk + D_BRAM * PPW - 1) / (D_BRAM * PPW);
    by_width = (((nblk - 1) % PPW) + nblk + PPW - 1) / PPW;
    return (by_cap > by_width) ? by_cap : by_width;
  endfunction

  // Field widths of the instruction word.
  function automatic int unsigned start_w(int unsigned nbram);
    return (nbram > 1) ? $clog2(nbram) : 1;
  endfunction
  function automatic int unsigned offset_w();
    return $clog2(W_BRAM);
  endfunction
  function automatic int unsigned remain_w(int unsigned nblk);
    return $clog2(nblk);
  endfunction
  function automatic int unsigned cycle_w(int unsigned nline_max, int unsigned nblk);
    return $clog2((nline_max + nblk - 1) / nblk + 1);
  endfunction

  // Decoded instruction (fields zero-extended to 16 bits).
  typedef struct packed {
    logic [15:0] start;   // BRAM index of the line-initial block
    logic [15:0] offset;  // pixel offset inside that BRAM word
    logic [15:0] remain;  // pixels of the next line in the last block
    logic [15:0] cycles;  // number of blocks of this line
    logic        ret;     // last instruction of the periodic list
  } instr_t;

  // Field widths are passed in (sw, ow, rw, cw = start_w, offset_w,
  // remain_w, cycle_w of the configuration) so that callers evaluate them as
  // constants.
  function automatic instr_t decode_instr(logic [INSTR_W-1:0] w, int unsigned sw,
                                          int unsigned ow, int unsigned rw, int unsigned cw);
    instr_t d;
    int unsigned p;
    d = '0;
    p = 0;
    for (int i = 0; i < sw; i++)            d.start[i]  = w[p + i];
    p += sw;
    for (int i = 0; i < ow; i++)                d.offset[i] = w[p + i];
    p += ow;
    for (int i = 0; i < rw; i++)            d.remain[i] = w[p + i];
    p += rw;
    for (int i = 0; i < cw; i++)  d.cycles[i] = w[p + i];
    p += cw;
    d.ret = w[p];
    return d;
  endfunction

  function automatic logic [INSTR_W-1:0] encode_instr(instr_t d, int unsigned sw,
                                                      int unsigned ow, int unsigned rw, int unsigned cw);
    logic [INSTR_W-1:0] w;
    int unsigned p;
    w = '0;
    p = 0;
    for (int i = 0; i < sw; i++)            w[p + i] = d.start[i];
    p += sw;
    for (int i = 0; i < ow; i++)                w[p + i] = d.offset[i];
    p += ow;
    for (int i = 0; i < rw; i++)            w[p + i] = d.remain[i];
    p += rw;
    for (int i = 0; i < cw; i++)  w[p + i] = d.cycles[i];
    p += cw;
    w[p] = d.ret;
    return w;
  endfunction

endpackage
