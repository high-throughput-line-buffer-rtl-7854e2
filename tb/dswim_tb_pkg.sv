// dswim_tb_pkg: testbench helpers for the D-SWIM buffer.
//
// gen_instr builds the periodic instruction list for an image width the way
// the host software does: starting from no carried pixels, each line gets
// START = R / 8, OFFSET = R % 8, CYCLE = ceil((N_line - R) / N_blk) and a new
// carry R' = (N_blk - (N_line - R) % N_blk) % N_blk; the list ends, with
// RETURN set, at the first line whose carry is zero. The image width must be
// at least N_blk.
package dswim_tb_pkg;
  import dswim_pkg::*;

  typedef instr_t instr_q_t[$];

  function automatic instr_q_t gen_instr(int nline, int nblk);
    instr_q_t q;
    instr_t   d;
    int       r, rn;
    r = 0;
    q = {};
    forever begin
      d = '0;
      d.start  = 16'(r / PPW);
      d.offset = 16'(r % PPW);
      d.cycles = 16'((nline - r + nblk - 1) / nblk);
      rn       = (nblk - ((nline - r) % nblk)) % nblk;
      d.remain = 16'(rn);
      d.ret    = (rn == 0);
      q.push_back(d);
      r = rn;
      if (rn == 0) break;
    end
    return q;
  endfunction
endpackage
