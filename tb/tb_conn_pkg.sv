// tb_conn_pkg: synthetic connectome used by the testbenches. Synaptic
// lists are defined by formulas of the list index and the word position,
// so memory contents never have to be stored:
//   length(idx)        = fan + idx mod 5        (fan < 0: always 0)
//   target worker      = (7*idx + j) mod nw,  slot = (idx + 3*j) mod npw
//   delay              = 1 + (idx + j) mod dmax
//   weight (Q16.16)    = -0x800 when (idx + j) mod 4 = 0, else 0x400*(1 + j mod 3)
// for synapse j = 1..length; word 0 of each list holds the length.
package tb_conn_pkg;
  import neuroaix_pkg::*;

  function automatic int list_len(int idx, int fan);
    return (fan < 0) ? 0 : fan + idx % 5;
  endfunction

  function automatic synapse_t syn(int idx, int j, int nw, int npw, int dmax);
    synapse_t s;
    s        = '0;
    s.target = {8'((7 * idx + j) % nw), 8'((idx + 3 * j) % npw)};
    s.delay  = 8'(1 + (idx + j) % dmax);
    s.weight = ((idx + j) % 4 == 0) ? -32'sh800 : 32'(32'h400 * (1 + j % 3));
    return s;
  endfunction

  function automatic logic [BEAT_W-1:0] beat(int addr, int stride, int fan, int nw, int npw, int dmax);
    logic [BEAT_W-1:0] b;
    int idx, off, len;
    idx = addr / stride;
    off = addr % stride;
    len = list_len(idx, fan);
    b   = '0;
    for (int k = 0; k < SYN_PER_BEAT; k++) begin
      int w;
      w = off * SYN_PER_BEAT + k;
      if (w == 0) b[k*SYN_W +: SYN_W] = 64'(len);
      else if (w <= len) b[k*SYN_W +: SYN_W] = syn(idx, w, nw, npw, dmax);
    end
    return b;
  endfunction
endpackage
