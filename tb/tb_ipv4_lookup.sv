// tb_ipv4_lookup: IPv4 destination lookup through the full-size hybrid TCAM.
//
// A small CIDR routing table is stored the way the architecture intends:
// prefixes are sorted longest first inside each group, the groups with leading
// bytes 143, 203 and 201 go to sub-banks 1..3 (the leading byte becomes the
// MF word), and the prefixes with unshared leading bytes (31, 69) go to the
// extra bank. A 32-bit address occupies bits 143:112 of the 144-bit word;
// prefix tails and bits 111:0 are stored as don't care. Unused entries hold
// "care" ones in bits 111:0 so that no key (whose bits 111:0 are zero) can hit
// them.
//
// Each lookup key is checked against a longest-prefix-match reference computed
// from prefix lengths: the searched bank must be the one that holds the key's
// leading byte (or the extra bank), its match lines must mark every matching
// prefix (column 0 winning within a word line), and the lowest set match line
// must be the longest matching prefix. Directed keys hit every table entry;
// random keys follow.
module tb_ipv4_lookup;
  import tcam_pkg::*;
  localparam int M = 144, NS = 3, N = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  op_e op;
  logic [9:0] addr;
  logic [M-1:0] key, wval, wdc, rd_val, rd_dc;
  logic [N-1:0] ml_sub [NS];
  logic [N-1:0] ml_extra;
  logic [NS:0] ben_q, bank_eval;
  logic srch_valid, rd_valid;

  hybrid_tcam dut (.clk(clk), .rst_n(rst_n), .op(op), .addr(addr), .key(key), .wval(wval), .wdc(wdc),
    .ml_sub(ml_sub), .ml_extra(ml_extra), .ben_q(ben_q), .srch_valid(srch_valid),
    .rd_val(rd_val), .rd_dc(rd_dc), .rd_valid(rd_valid), .bank_eval(bank_eval));

  // the routing table: {a, b, c, d, prefix length, bank}, sorted as stored
  typedef struct { logic [31:0] ip; int len; int bank; } route_t;
  localparam int NR = 13;
  route_t rt [NR];
  int slot [NR];                 // entry index inside its bank
  int n_exact = 0, n_lpm_shorter = 0, n_extra = 0, n_miss = 0;

  function automatic logic [31:0] ip4(int a, int b, int c, int d);
    return {8'(a), 8'(b), 8'(c), 8'(d)};
  endfunction

  function automatic logic pmatch(route_t r, logic [31:0] ip);
    logic [31:0] mask;
    mask = (r.len == 0) ? '0 : ~(32'hffff_ffff >> r.len);
    return ((r.ip ^ ip) & mask) == '0;
  endfunction

  task automatic cmd(op_e o, logic [9:0] a, logic [M-1:0] k, logic [M-1:0] v, logic [M-1:0] d);
    @(posedge clk); #1;
    op = o; addr = a; key = k; wval = v; wdc = d;
  endtask

  task automatic lookup(logic [31:0] ip);
    int bank, best, best_len;
    logic [N-1:0] exp_ml, got;
    logic [NS:0] exp_ben;
    case (ip[31:24])               // MF word n holds the leading byte of group n
      8'd143:  bank = 1;
      8'd203:  bank = 2;
      8'd201:  bank = 3;
      default: bank = 0;
    endcase
    exp_ben = '0; exp_ben[bank] = 1'b1;
    exp_ml = '0; best = -1; best_len = -1;
    for (int r = 0; r < NR; r++)
      if (rt[r].bank == bank && pmatch(rt[r], ip)) begin
        exp_ml[slot[r]] = 1'b1;
        if (rt[r].len > best_len) begin best_len = rt[r].len; best = slot[r]; end
      end
    for (int w = 0; w < N / 2; w++) if (exp_ml[2*w]) exp_ml[2*w+1] = 1'b0;
    cmd(OP_SEARCH, '0, {ip, 112'b0}, '0, '0);
    cmd(OP_NOP, '0, '0, '0, '0);     // search registered at this edge
    @(posedge clk); #2;               // result registered one edge later
    got = (bank == 0) ? ml_extra : ml_sub[bank-1];
    checks += 3;
    if (!srch_valid || ben_q !== exp_ben) begin failures++; $display("FAIL %h: ben=%b exp=%b", ip, ben_q, exp_ben); end
    if (got !== exp_ml) begin failures++; $display("FAIL %h: match lines %h exp %h", ip, got, exp_ml); end
    if (best < 0) begin
      if (got != '0) begin failures++; $display("FAIL %h: hit where no prefix matches", ip); end
      n_miss++;
    end else begin
      int lowest;
      lowest = -1;
      for (int e = N - 1; e >= 0; e--) if (got[e]) lowest = e;
      if (lowest != best) begin failures++; $display("FAIL %h: lowest match %0d, longest prefix at %0d", ip, lowest, best); end
      if (best_len == 32) n_exact++; else n_lpm_shorter++;
      if (bank == 0) n_extra++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt [NS+1];
    logic [M-1:0] v, d;
    rt = '{
      '{ip4(143,128,179,103), 32, 1}, '{ip4(143,128,201,0), 24, 1}, '{ip4(143,248,202,0), 24, 1},
      '{ip4(143,248,0,0),     16, 1}, '{ip4(143,0,0,0),      8, 1},
      '{ip4(203,128,0,0),     16, 2}, '{ip4(203,201,0,0),   16, 2}, '{ip4(203,238,208,123), 32, 2},
      '{ip4(203,0,0,0),        8, 2},
      '{ip4(201,183,221,0),   24, 3}, '{ip4(201,238,128,65), 32, 3},
      '{ip4(31,23,129,0),     24, 0}, '{ip4(69,231,0,0),    16, 0}
    };
    op = OP_NOP; addr = '0; key = '0; wval = '0; wdc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cnt = '{default: 0};
    foreach (rt[r]) begin slot[r] = cnt[rt[r].bank]; cnt[rt[r].bank]++; end
    // fill every entry of every bank; table entries first, bank by bank
    for (int b = 1; b <= NS + 1; b++) begin
      int bank;
      bank = b % (NS + 1);       // sub-banks 1..3, then the extra bank
      for (int e = 0; e < N; e++) begin
        int r;
        r = -1;
        foreach (rt[i]) if (rt[i].bank == bank && slot[i] == e) r = i;
        if (r >= 0) begin
          v = {rt[r].ip, 112'b0};
          d = {(rt[r].len == 0) ? 32'hffff_ffff : (32'hffff_ffff >> rt[r].len), {112{1'b1}}};
        end else begin
          v = {(bank == 1) ? 8'd143 : (bank == 2) ? 8'd203 : (bank == 3) ? 8'd201 : 8'd0, 24'h0, {112{1'b1}}};
          d = '0;
        end
        cmd(OP_WRITE, {2'(bank), 8'(e)}, '0, v, d);
      end
    end
    cmd(OP_NOP, '0, '0, '0, '0);

    // directed lookups
    lookup(ip4(143,128,179,103)); lookup(ip4(143,128,201,7));  lookup(ip4(143,248,202,9));
    lookup(ip4(143,248,1,1));     lookup(ip4(143,1,2,3));      lookup(ip4(203,128,5,5));
    lookup(ip4(203,201,77,1));    lookup(ip4(203,238,208,123)); lookup(ip4(203,238,1,1));
    lookup(ip4(201,183,221,9));   lookup(ip4(201,238,128,65)); lookup(ip4(201,1,1,1));
    lookup(ip4(31,23,129,200));   lookup(ip4(69,231,4,4));     lookup(ip4(10,1,2,3));
    // random lookups biased towards the table
    for (int t = 0; t < 400; t++) begin
      logic [31:0] ip;
      int r;
      r = $urandom_range(0, NR - 1);
      ip = $urandom;
      if (t % 4 != 3) begin
        logic [31:0] mask;
        mask = ~(32'hffff_ffff >> rt[r].len);
        ip = (rt[r].ip & mask) | (ip & ~mask);
        if (t % 4 == 2) ip[$urandom_range(0, 23)] ^= 1'b1;
      end
      lookup(ip);
    end
    $display("exact=%0d shorter-prefix=%0d extra=%0d miss=%0d", n_exact, n_lpm_shorter, n_extra, n_miss);
    checks++;
    if (n_exact == 0 || n_lpm_shorter == 0 || n_extra == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
