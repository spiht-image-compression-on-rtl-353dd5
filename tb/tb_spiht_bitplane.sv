// tb_spiht_bitplane: Fixed Order SPIHT rules for one block. Units for planes
// 0, 3, 9 and 21 see random records whose bit lengths cluster around each
// plane, so that every case occurs: inactive blocks, root blocks, blocks
// whose parent set turns significant at this plane, insignificant and newly
// significant coefficients, refinement, type A and type B set tests. Each
// unit's three groups (bits and counts) are compared with a list-by-list
// model of the rules.
module tb_spiht_bitplane;
  import spiht_pkg::*;
  localparam int NP = 4;
  localparam int PL [NP] = '{0, 3, 9, 21};
  blk_rec_t rec;
  logic [3:0][MAG_W-1:0] mag;
  logic [3:0] sign;
  logic [NP-1:0][15:0] lipb, lisb, lspb;
  logic [NP-1:0][4:0]  lipc, lisc, lspc;
  int checks = 0, failures = 0;
  int seen [8];

  for (genvar k = 0; k < NP; k++) begin : g_u
    spiht_bitplane #(.P(PL[k])) u (.rec, .mag, .sign, .lip_bits(lipb[k]), .lip_cnt(lipc[k]),
      .lis_bits(lisb[k]), .lis_cnt(lisc[k]), .lsp_bits(lspb[k]), .lsp_cnt(lspc[k]));
  end

  function automatic int nbl(longint v);
    int b = 0;
    while (v > 0) begin b++; v >>= 1; end
    return b;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6000; t++) begin
      int p, ctr, pm, dmx;
      bit act, nw, live;
      bit qa [3][$];
      for (int l = 0; l < 3; l++) qa[l].delete();
      p = PL[t % NP];
      ctr = p + int'($urandom_range(0, 4)) - 2;
      rec = '0;
      rec.is_root = ($urandom_range(0, 5) == 0);
      pm = 0; dmx = 0;
      for (int i = 0; i < 4; i++) begin
        int b;
        b = ctr + int'($urandom_range(0, 4)) - 2;
        b = (b < 0) ? 0 : (b > 22) ? 22 : b;
        mag[i] = (b == 0) ? '0 : (MAG_W'(1) << (b - 1)) | (MAG_W'({$urandom(), $urandom()}) & ((MAG_W'(1) << (b - 1)) - 1));
        sign[i] = $urandom_range(0, 1);
        rec.has_d[i] = rec.is_root ? (i != 0) : ($urandom_range(0, 3) != 0);
        rec.has_l[i] = rec.has_d[i] && ($urandom_range(0, 2) != 0);
        rec.d_nb[i]  = rec.has_d[i] ? 5'($urandom_range((ctr > 2) ? ctr - 2 : 0, (ctr + 2 > 22) ? 22 : ctr + 2)) : '0;
        rec.l_nb[i]  = rec.has_l[i] ? 5'($urandom_range(0, rec.d_nb[i])) : '0;
        if (nbl(mag[i]) > pm) pm = nbl(mag[i]);
        if (rec.d_nb[i] > pm) pm = rec.d_nb[i];
        if (rec.has_d[i] && rec.d_nb[i] > dmx) dmx = rec.d_nb[i];
      end
      rec.p_nb = 5'(pm);
      // model
      act  = rec.is_root || pm > p;
      nw   = !rec.is_root && pm == p + 1;
      live = rec.is_root || dmx > p;
      for (int i = 0; i < 4; i++) begin
        int b;
        b = nbl(mag[i]);
        if (!act) continue;
        if (nw) begin
          qa[1].push_back(b > p); if (b > p) qa[1].push_back(sign[i]); seen[0]++;
        end else if (b <= p + 1) begin
          qa[0].push_back(b > p); if (b > p) begin qa[0].push_back(sign[i]); seen[1]++; end
          seen[2]++;
        end else begin
          qa[2].push_back(mag[i][p]); seen[3]++;
        end
      end
      for (int i = 0; i < 4; i++) begin
        if (!(act && live && rec.has_d[i])) continue;
        if (rec.d_nb[i] <= p + 1) begin qa[1].push_back(rec.d_nb[i] > p); seen[4]++; end
        if (rec.has_l[i] && rec.d_nb[i] > p && rec.l_nb[i] <= p + 1) begin qa[1].push_back(rec.l_nb[i] > p); seen[5]++; end
      end
      if (!act) seen[6]++;
      if (rec.is_root) seen[7]++;
      #1;
      for (int l = 0; l < 3; l++) begin
        logic [15:0] eb, gb;
        logic [4:0] gc;
        eb = '0;
        foreach (qa[l][k]) eb = {eb[14:0], qa[l][k]};
        gb = (l == 0) ? lipb[t % NP] : (l == 1) ? lisb[t % NP] : lspb[t % NP];
        gc = (l == 0) ? lipc[t % NP] : (l == 1) ? lisc[t % NP] : lspc[t % NP];
        checks++;
        if (int'(gc) != qa[l].size() || gb != eb) begin
          failures++;
          if (failures < 10) $display("FAIL plane %0d list %0d: %0d bits %h, expected %0d bits %h", p, l, gc, gb, qa[l].size(), eb);
        end
      end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("case %0d never occurred", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
