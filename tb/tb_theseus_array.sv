// tb_theseus_array: self-checking test of construction, self-inspection
// and replication on a 4 x 8 molecule mesh.
// For several random cell shapes (self-avoiding walks in the left half of
// the mesh, starting at entry 0) the test sends the genome, checks that
// each word sits in the molecule the path puts it in and that it takes two
// cycles per molecule to finish, streams the genome out by inspection and
// compares it with what was sent (and checks the cell is unchanged), then
// replicates the cell into the right half through entry 1 and checks the
// copy molecule by molecule. Finally one word too many is sent to show
// the overflow flag.
module tb_theseus_array;
  import ubichip_pkg::*;
  localparam int R = 4, C = 8, CW = 16, W = 3 + CW, N = R * C;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, repl_en = 0;
  logic [1:0] ext_valid = '0, shift_en = '0;
  logic [1:0][W-1:0] ext_data = '0;
  logic [1:0][W-1:0] head_word;
  logic [N-1:0][W-1:0] word;
  logic [N-1:0] built, cell_id;
  logic overflow;

  theseus_array #(.ROWS(R), .COLS(C), .CFG_W(CW)) dut (
    .clk, .rst_n, .clear, .ext_valid, .ext_data, .shift_en, .repl_en,
    .head_word, .word, .built, .cell_id, .overflow);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pr [$], pc [$];
  logic [W-1:0] genome [$];
  int dr [4] = '{-1, 0, 1, 0};
  int dc [4] = '{0, 1, 0, -1};

  task automatic make_path(input int len);
    bit used [R][C];
    pr.delete(); pc.delete(); genome.delete();
    pr.push_back(0); pc.push_back(0); used[0][0] = 1;
    while (pr.size() < len) begin
      int opts [$];
      for (int d = 0; d < 4; d++) begin
        int nr, nc;
        nr = pr[$] + dr[d]; nc = pc[$] + dc[d];
        if (nr >= 0 && nr < R && nc >= 0 && nc < C/2 && !used[nr][nc]) opts.push_back(d);
      end
      if (opts.size() == 0) break;
      begin
        int d;
        d = opts[$urandom_range(0, opts.size() - 1)];
        genome.push_back({3'(d), CW'($urandom)});
        pr.push_back(pr[$] + dr[d]); pc.push_back(pc[$] + dc[d]);
        used[pr[$]][pc[$]] = 1;
      end
    end
    genome.push_back({3'(TD_END), CW'($urandom)});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int t = 0; t < 12; t++) begin
      int K, nb;
      logic [W-1:0] got [$];
      got.delete();
      clear = 1; @(posedge clk); #1; clear = 0;
      make_path($urandom_range(2, 12));
      K = genome.size();
      // ---- construction
      for (int j = 0; j < K; j++) begin
        ext_valid[0] = 1; ext_data[0] = genome[j]; @(posedge clk); #1;
      end
      ext_valid = '0;
      repeat (K - 2) @(posedge clk);
      #1;
      nb = $countones(built);
      check(nb == K - 1, $sformatf("shape %0d: %0d built one cycle early, exp %0d", t, nb, K - 1));
      @(posedge clk); #1;
      check($countones(built) == K, $sformatf("shape %0d: %0d molecules built, exp %0d", t, $countones(built), K));
      for (int j = 0; j < K; j++) begin
        int i;
        i = pr[j] * C + pc[j];
        check(built[i] && word[i] == genome[j] && cell_id[i] == 0, $sformatf("shape %0d word %0d in place", t, j));
      end
      // ---- self-inspection: K shifts stream the genome out in order
      for (int j = 0; j < K; j++) begin
        got.push_back(head_word[0]);
        shift_en[0] = 1; @(posedge clk); #1;
      end
      shift_en = '0;
      for (int j = 0; j < K; j++) check(got[j] == genome[j], $sformatf("inspected word %0d: %h exp %h", j, got[j], genome[j]));
      for (int j = 0; j < K; j++)
        check(word[pr[j] * C + pc[j]] == genome[j], $sformatf("word %0d restored", j));
      // ---- replication into the right half
      repl_en = 1;
      repeat (K) @(posedge clk);
      #1; repl_en = 0;
      repeat (2 * K) @(posedge clk);
      #1;
      check($countones(built) == 2 * K, "copy has the same size");
      for (int j = 0; j < K; j++) begin
        int i, k;
        i = pr[j] * C + pc[j];
        k = i + C / 2;
        check(built[k] && word[k] == genome[j] && cell_id[k] == 1, $sformatf("copy word %0d", j));
        check(word[i] == genome[j], $sformatf("original word %0d kept", j));
      end
      check(!overflow, "no overflow");
    end
    ext_valid[0] = 1; ext_data[0] = {3'(TD_N), CW'(0)}; @(posedge clk); #1; ext_valid = '0;
    repeat (40) @(posedge clk);
    #1;
    check(overflow, "overflow when a full cell receives a word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
