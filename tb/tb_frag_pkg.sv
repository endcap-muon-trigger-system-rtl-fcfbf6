// tb_frag_pkg: test-bench helpers that build Star Switch fragments in the
// Front End link format and the hits the ROD is expected to decode from
// them, independently of the RTL.
//
// make_frag() produces the 16-bit words of one fragment (event header,
// for each Slave Board an SLB header, an SLB header 2 and random cell data
// words, then the event trailer whose low half makes the XOR of all words
// zero) and, alongside, the expected 32-bit hit words for the hit pipe
// (cells 0..19) and the tracklet pipe (cells 20..24), in emission order.
package tb_frag_pkg;
  typedef logic [15:0] wq_t[$];
  typedef logic [31:0] hq_t[$];

  function automatic void push32(ref wq_t w, input logic [31:0] v);
    w.push_back(v[31:16]);
    w.push_back(v[15:0]);
  endfunction

  // ch: FE channel 0..11, sswid: SSW ID, l1lo: low 4 bits of the L1ID,
  // nslb: number of Slave Boards, maxcells: cell data words per SLB (random 0..maxcells)
  function automatic void make_frag(input int ch, input int sswid, input int l1lo,
                                    input int nslb, input int maxcells,
                                    output wq_t w, output hq_t hits, output hq_t trks);
    logic [15:0] x;
    w = {}; hits = {}; trks = {};
    push32(w, {3'b000, 2'b01, 4'(sswid), 23'h7FFFFF});
    for (int s = 0; s < nslb; s++) begin
      int slbid = (s * 3 + 1) % 32;
      int rxid  = s % 23;
      int nc    = $urandom_range(maxcells, 0);
      push32(w, {3'b010, 5'(slbid), 1'b0, 3'b111, 3'd2, 1'b0, 4'(l1lo), 12'h123});
      push32(w, {3'b011, 1'b0, 1'b0, 5'(rxid), 1'b0, 21'h0});
      for (int c = 0; c < nc; c++) begin
        int cl = $urandom_range(24, 0);
        int bcsel = $urandom_range(2, 0);   // 0 prev, 1 cur, 2 next
        logic [7:0] bm = 8'($urandom_range(255, 1));
        logic [2:0] wt = (bcsel == 0) ? 3'b101 : (bcsel == 1) ? 3'b100 : 3'b110;
        w.push_back({wt, 5'(cl), bm});
        for (int b = 0; b < 8; b++) if (bm[b]) begin
          logic [31:0] hw = {2'(bcsel), 4'(ch), 5'(rxid), 5'(slbid), 8'(cl * 8 + b), 8'h00};
          if (cl < 20) hits.push_back(hw); else trks.push_back(hw);
        end
      end
      if ($urandom_range(3, 0) == 0) w.push_back(16'hDF00);   // PAD word
    end
    x = 16'h0;
    foreach (w[i]) x ^= w[i];
    x ^= {3'b111, 9'h1CA, 4'h0};
    push32(w, {3'b111, 9'h1CA, 4'h0, x});
  endfunction

  // XOR of all words
  function automatic logic [15:0] xor_all(input wq_t w);
    logic [15:0] x = 16'h0;
    foreach (w[i]) x ^= w[i];
    return x;
  endfunction
endpackage
