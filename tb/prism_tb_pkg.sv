// prism_tb_pkg: stimulus and reference model shared by the parser testbenches.
//
// - ref_parse: a plain behavioural model of the parse, written from the
//   parsing rules and not from the RTL: for every 64-bit word (clock number) of
//   the header it looks for the candidate bitmap equal to the bitmap reached so
//   far, and for every enabled protocol takes the two selected bytes, masks
//   them, looks the value up among the protocol's keys and sets the bit of the
//   next protocol.
// - enterprise_cfg: configuration and control for a small enterprise parse
//   graph (Ethernet, VLAN, IPv4, IPv6 -> TCP, UDP, ICMP), worked out by hand
//   from the header offsets, as the configuration software would.
// - make_pkt: Ethernet frames of that graph, with the bitmap they must give.
// - rand_case: a random configuration, control and packet, built so that
//   candidate bitmaps and keys match often.
package prism_tb_pkg;
  import prism_pkg::*;

  typedef byte unsigned bytes_t[];

  // Protocol IDs of the enterprise graph (IDs of the Ethernet transitions as in
  // the compiled P4 example: outer VLAN 2, inner VLAN 3, IPv4 4, IPv6 5). IDs
  // 1..7 have an investigator; ID 7 is left unused by this graph.
  localparam int ETH = 1, OVLAN = 2, IVLAN = 3, IPV4 = 4, IPV6 = 5, HBH = 6;
  localparam int TCP = 8, UDP = 9, ICMP = 10;

  function automatic bitmap_t bit_of(int id);
    return bitmap_t'(1) << (id - 1);
  endfunction

  // Byte i of a packet, zero past its end.
  function automatic byte unsigned pb(const ref bytes_t p, input int i);
    return (i < p.size()) ? p[i] : 8'h00;
  endfunction

  // Bus word `idx` of `bus_bytes` bytes, first byte in the most significant bits.
  function automatic logic [1023:0] bus_word(const ref bytes_t p, input int idx, input int bus_bytes);
    logic [1023:0] r = '0;
    for (int i = 0; i < bus_bytes; i++) r = (r << 8) | 1024'(pb(p, idx * bus_bytes + i));
    return r;
  endfunction

  function automatic int words_of(int len, int bus_bytes);
    return (len + bus_bytes - 1) / bus_bytes;
  endfunction

  // Reference parse. The parser sees whole bus words, so the clocks covered are
  // those of the bus words the packet occupies (zero padding included), at most N_CLK.
  function automatic bitmap_t ref_parse(const ref cfg_t cfg, const ref ctrl_t ctrl,
                                        const ref bytes_t p, input int bus_bytes);
    bitmap_t prev = bit_of(ROOT_ID);
    int nclk = words_of(p.size(), bus_bytes) * bus_bytes / 8;
    if (nclk > N_CLK) nclk = N_CLK;
    for (int c = 0; c < nclk; c++) begin
      int d = -1;
      bitmap_t add = '0;
      for (int j = N_DIR - 1; j >= 0; j--)
        if (ctrl.cand[c][j] == prev && prev != '0) d = j;
      if (d < 0) continue;
      for (int q = 0; q < N_PI; q++) begin
        if (ctrl.sel_en[c][d].en[q]) begin
          int s = ctrl.sel_en[c][d].sel[q];
          logic [15:0] v = {pb(p, 8 * c + 2 * s), pb(p, 8 * c + 2 * s + 1)} & cfg.mask[q];
          for (int k = 0; k < N_KEYS; k++) begin
            if (v == cfg.keys[q][k] && cfg.next_ids[q][k] != 0) begin
              if (cfg.next_ids[q][k] <= N_PROTO) add |= bit_of(cfg.next_ids[q][k]);
              break;
            end
          end
        end
      end
      prev |= add;
    end
    return prev;
  endfunction

  // Protocols found in one 64-bit word under one select/enable set.
  function automatic bitmap_t ref_found(const ref cfg_t cfg, input sel_en_t se,
                                        input logic [63:0] w);
    bitmap_t add = '0;
    byte unsigned b[8];
    for (int i = 0; i < 8; i++) b[i] = w[63 - 8 * i -: 8];
    for (int q = 0; q < N_PI; q++) begin
      if (se.en[q]) begin
        int s = se.sel[q];
        logic [15:0] v = {b[2 * s], b[2 * s + 1]} & cfg.mask[q];
        for (int k = 0; k < N_KEYS; k++) begin
          if (v == cfg.keys[q][k] && cfg.next_ids[q][k] != 0) begin
            if (cfg.next_ids[q][k] <= N_PROTO) add |= bit_of(cfg.next_ids[q][k]);
            break;
          end
        end
      end
    end
    return add;
  endfunction

  // Index of the first candidate equal to prev, -1 if none.
  function automatic int ref_dir(input cand_set_t cs, input bitmap_t prev);
    for (int j = 0; j < N_DIR; j++) if (cs[j] == prev && prev != '0) return j;
    return -1;
  endfunction

  // ---------------------------------------------------------------- enterprise graph
  // Keys: Ethernet type at bytes 12-13; VLAN type at tag bytes 2-3; IPv4
  // protocol at byte 9 (chunk of bytes 8-9, mask 00FF); IPv6 next header at
  // byte 6 (chunk of bytes 6-7, mask FF00); hop-by-hop options header (8
  // bytes) next header at byte 0 (mask FF00). Absolute chunk positions give:
  //   clock 1: {ETH}                 ETH   chunk 2 (bytes 12-13)
  //   clock 2: {ETH,OVLAN}           OVLAN chunk 0 (16-17), IVLAN chunk 2 (20-21)
  //            {ETH,IVLAN}           IVLAN chunk 0 (16-17)
  //            {ETH,IPV4}            IPV4  chunk 3 (22-23)
  //            {ETH,IPV6}            IPV6  chunk 2 (20-21)
  //   clock 3: {ETH,OVLAN,IVLAN,IPV4} IPV4 chunk 3 (30-31)
  //            {ETH,OVLAN,IVLAN,IPV6} IPV6 chunk 2 (28-29)
  //            {ETH,IVLAN,IPV4}      IPV4  chunk 1 (26-27)
  //            {ETH,IVLAN,IPV6}      IPV6  chunk 0 (24-25)
  //   clock 6: {ETH,IPV6,HBH}        HBH   chunk 3 (54-55)
  //   clock 7: {ETH,IVLAN,IPV6,HBH}  HBH   chunk 1 (58-59)
  //            {ETH,OVLAN,IVLAN,IPV6,HBH} HBH chunk 3 (62-63)
  function automatic void set_key(ref cfg_t c, input int id, input int k,
                                  input logic [15:0] key, input int nxt);
    c.keys[id-1][k]     = key;
    c.next_ids[id-1][k] = proto_id_t'(nxt);
  endfunction

  function automatic void set_ctl(ref ctrl_t t, input int clk, input int d,
                                  input bitmap_t cand, input int id, input int sel);
    t.cand[clk][d]              = cand;
    t.sel_en[clk][d].en[id-1]   = 1'b1;
    t.sel_en[clk][d].sel[id-1]  = SEL_W'(sel);
  endfunction

  function automatic void enterprise_cfg(output cfg_t c, output ctrl_t t);
    bitmap_t e = bit_of(ETH), ov = bit_of(OVLAN), iv = bit_of(IVLAN);
    bitmap_t v4 = bit_of(IPV4), v6 = bit_of(IPV6), hbh = bit_of(HBH);
    c = '0;
    t = '0;
    c.mask[ETH-1]   = 16'hFFFF;
    c.mask[OVLAN-1] = 16'hFFFF;
    c.mask[IVLAN-1] = 16'hFFFF;
    c.mask[IPV4-1]  = 16'h00FF;
    c.mask[IPV6-1]  = 16'hFF00;
    c.mask[HBH-1]   = 16'hFF00;
    set_key(c, ETH, 0, 16'h0800, IPV4);
    set_key(c, ETH, 1, 16'h8100, IVLAN);
    set_key(c, ETH, 2, 16'h9100, OVLAN);
    set_key(c, ETH, 3, 16'h86DD, IPV6);
    set_key(c, OVLAN, 0, 16'h8100, IVLAN);
    set_key(c, IVLAN, 0, 16'h0800, IPV4);
    set_key(c, IVLAN, 1, 16'h86DD, IPV6);
    set_key(c, IPV4, 0, 16'h0006, TCP);
    set_key(c, IPV4, 1, 16'h0011, UDP);
    set_key(c, IPV4, 2, 16'h0001, ICMP);
    set_key(c, IPV6, 0, 16'h0600, TCP);
    set_key(c, IPV6, 1, 16'h1100, UDP);
    set_key(c, IPV6, 2, 16'h3A00, ICMP);
    set_key(c, IPV6, 3, 16'h0000, HBH);
    set_key(c, HBH, 0, 16'h0600, TCP);
    set_key(c, HBH, 1, 16'h1100, UDP);
    set_key(c, HBH, 2, 16'h3A00, ICMP);
    set_ctl(t, 1, 0, e, ETH, 2);
    set_ctl(t, 2, 0, e | ov, OVLAN, 0);
    set_ctl(t, 2, 0, e | ov, IVLAN, 2);
    set_ctl(t, 2, 1, e | iv, IVLAN, 0);
    set_ctl(t, 2, 2, e | v4, IPV4, 3);
    set_ctl(t, 2, 3, e | v6, IPV6, 2);
    set_ctl(t, 3, 0, e | ov | iv | v4, IPV4, 3);
    set_ctl(t, 3, 1, e | ov | iv | v6, IPV6, 2);
    set_ctl(t, 3, 2, e | iv | v4, IPV4, 1);
    set_ctl(t, 3, 3, e | iv | v6, IPV6, 0);
    set_ctl(t, 6, 0, e | v6 | hbh, HBH, 3);
    set_ctl(t, 7, 0, e | iv | v6 | hbh, HBH, 1);
    set_ctl(t, 7, 1, e | ov | iv | v6 | hbh, HBH, 3);
  endfunction

  // vlans: 0 none, 1 one tag (0x8100), 2 outer 0x9100 + inner 0x8100.
  // l3: 0 IPv4, 1 IPv6, 2 IPv6 + hop-by-hop header, 3 unknown EtherType.
  // l4: 0 TCP, 1 UDP, 2 ICMP, 3 unknown.
  // Frames must be at least 72 bytes long to hold every key.
  function automatic bytes_t make_pkt(input int vlans, input int l3, input int l4,
                                      input int len, output bitmap_t exp_bm);
    bytes_t p = new[len];
    int o = 12;
    logic [7:0] l4v4[4] = '{8'd6, 8'd17, 8'd1, 8'd99};
    logic [7:0] l4v6[4] = '{8'd6, 8'd17, 8'd58, 8'd99};
    int l4id[4] = '{TCP, UDP, ICMP, 0};
    for (int i = 0; i < len; i++) p[i] = 8'($urandom);
    exp_bm = bit_of(ETH);
    if (vlans == 2) begin
      p[o] = 8'h91; p[o+1] = 8'h00; o += 4;
      exp_bm |= bit_of(OVLAN);
    end
    if (vlans >= 1) begin
      p[o] = 8'h81; p[o+1] = 8'h00; o += 4;
      exp_bm |= bit_of(IVLAN);
    end
    case (l3)
      0: begin
        p[o] = 8'h08; p[o+1] = 8'h00; p[o+2+9] = l4v4[l4];
        exp_bm |= bit_of(IPV4);
      end
      1: begin
        p[o] = 8'h86; p[o+1] = 8'hDD; p[o+2+6] = l4v6[l4];
        exp_bm |= bit_of(IPV6);
      end
      2: begin
        p[o] = 8'h86; p[o+1] = 8'hDD; p[o+2+6] = 8'h00; p[o+2+40] = l4v6[l4];
        exp_bm |= bit_of(IPV6) | bit_of(HBH);
      end
      default: begin p[o] = 8'h88; p[o+1] = 8'hB5; end
    endcase
    if (l3 != 3 && l4 != 3) exp_bm |= bit_of(l4id[l4]);
    return p;
  endfunction

  // A random frame of the enterprise graph, 72..max_len bytes.
  function automatic bytes_t rand_pkt(input int max_len, output bitmap_t exp_bm);
    return make_pkt($urandom_range(2), $urandom_range(3), $urandom_range(3),
                    $urandom_range(72, max_len), exp_bm);
  endfunction

  // ---------------------------------------------------------------- random cases
  function automatic byte unsigned rbyte();
    byte unsigned a[5] = '{8'h00, 8'h01, 8'h08, 8'h81, 8'hFF};
    return a[$urandom_range(4)];
  endfunction

  function automatic void rand_case(output cfg_t c, output ctrl_t t, output bytes_t p,
                                    input int bus_bytes);
    logic [15:0] masks[3] = '{16'hFFFF, 16'h00FF, 16'hFF00};
    bitmap_t prev;
    int len = $urandom_range(8, 80);
    p = new[len];
    for (int i = 0; i < len; i++) p[i] = rbyte();
    c = '0;
    t = '0;
    for (int q = 0; q < N_PI; q++) begin
      c.mask[q] = masks[$urandom_range(2)];
      for (int k = 0; k < N_KEYS; k++) begin
        c.keys[q][k]     = {rbyte(), rbyte()} & c.mask[q];
        c.next_ids[q][k] = proto_id_t'($urandom_range(0, 11));
      end
    end
    prev = bit_of(ROOT_ID);
    for (int cl = 0; cl < N_CLK; cl++) begin
      int dstar = $urandom_range(N_DIR - 1);
      for (int d = 0; d < N_DIR; d++) begin
        t.sel_en[cl][d].en  = N_PI'($urandom);
        t.sel_en[cl][d].sel = (N_PI * SEL_W)'($urandom);
        t.cand[cl][d]       = bitmap_t'($urandom);
      end
      if ($urandom_range(3) != 0) t.cand[cl][dstar] = prev;
      // Make the keys at this clock likely to match the packet.
      for (int q = 0; q < N_PI; q++) begin
        if (t.sel_en[cl][dstar].en[q] && $urandom_range(1)) begin
          int s = t.sel_en[cl][dstar].sel[q];
          int k = $urandom_range(N_KEYS - 1);
          c.keys[q][k] = {pb(p, 8 * cl + 2 * s), pb(p, 8 * cl + 2 * s + 1)} & c.mask[q];
          c.next_ids[q][k] = proto_id_t'($urandom_range(1, 10));
          prev |= bit_of(c.next_ids[q][k]);
        end
      end
    end
  endfunction

endpackage
