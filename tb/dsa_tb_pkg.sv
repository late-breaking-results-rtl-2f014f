// dsa_tb_pkg: reference models shared by the accelerator testbenches.
//
// encode_layer is a behavioural model of the offline storage-format encoder:
// it counts the zero weights of a layer, chooses sparse storage when the zero
// fraction reaches the sparsity threshold (given in percent), and lays out the
// value block followed by the index block (nonzero positions in sparse mode,
// zero positions in dense-mapping mode) from word address s_addr on.
// meta_value turns bit metadata back into the signed weight it encodes.
package dsa_tb_pkg;
  import dsa_pkg::*;

  typedef logic [MEM_W-1:0] word_q_t[$];

  function automatic void encode_layer(input int w[], input int s_addr, input int spth_pct,
                                       input int force_mode, // -1: by threshold, 0/1: forced
                                       output word_q_t img, output layer_hdr_t hdr);
    int nz = 0;
    bit sparse;
    word_q_t vals, idxs;
    foreach (w[i]) if (w[i] == 0) nz++;
    sparse = (force_mode < 0) ? (nz * 100 >= spth_pct * w.size()) : (force_mode == 1);
    foreach (w[i]) begin
      if (w[i] != 0) vals.push_back(MEM_W'(w[i] & 8'hFF));
      if (sparse  && w[i] != 0) idxs.push_back(MEM_W'(i));
      if (!sparse && w[i] == 0) idxs.push_back(MEM_W'(i));
    end
    img = {vals, idxs};
    hdr.s_addr   = ADDR_W'(s_addr);
    hdr.idx_addr = ADDR_W'(s_addr + vals.size());
    hdr.e_addr   = ADDR_W'(s_addr + vals.size() + idxs.size());
    hdr.ds       = sparse;
  endfunction

  // Reference bit metadata of a weight (ascending nonzero-bit positions).
  function automatic bitmeta_t make_meta(input int w);
    bitmeta_t m = '0;
    int mag = (w < 0) ? -w : w;
    int k = 0;
    m.sign = (w < 0);
    for (int b = 0; b < MAG_W; b++)
      if (mag[b]) begin m.tbitpos[k] = BPOS_W'(b); k++; end
    m.nnzb = NNZB_W'(k);
    return m;
  endfunction

  // Tile length under a tile_info record.
  function automatic int tile_len(input tile_info_t t, input int id);
    if (id == int'(t.id_start)) return int'(t.ts_num);
    if (id == int'(t.id_end))   return int'(t.te_num);
    return int'(t.pe_size);
  endfunction

  function automatic int meta_value(input bitmeta_t m);
    int v = 0;
    for (int j = 0; j < int'(m.nnzb); j++) v += 1 << m.tbitpos[j];
    return m.sign ? -v : v;
  endfunction

  // Random 8-bit weight: zero with probability zero_pct percent.
  function automatic int rand_weight(input int zero_pct);
    int v;
    if (($urandom % 100) < zero_pct) return 0;
    do v = int'($urandom % 256) - 128; while (v == 0);
    return v;
  endfunction

  function automatic int popcount_mag(input int v);
    int m = (v < 0) ? -v : v;
    return $countones(m);
  endfunction

endpackage
