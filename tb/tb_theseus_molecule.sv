// tb_theseus_molecule: self-checking test of one THESEUS molecule.
// Random words are offered on random sides (or the external entry); the
// test checks that an empty molecule keeps the first word, its flag and
// the side it came from, forwards later words one cycle later to the side
// named by its flag, flags overflow at a path end, shifts in its
// successor's word (or the recirculated word at a path end) only when its
// own cell is shifted, and empties on clear.
module tb_theseus_molecule;
  import ubichip_pkg::*;
  localparam int CW = 8, W = 3 + CW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0;
  logic [3:0] in_valid = '0;
  logic [3:0][W-1:0] in_data = '0;
  logic [3:0] in_cid = '0;
  logic ext_valid = 0, ext_cid = 0;
  logic [W-1:0] ext_data = '0;
  logic [3:0] out_valid;
  logic [W-1:0] out_data, word;
  logic out_cid, built, is_head, cid, overflow;
  logic [3:0][W-1:0] nb_word = '0;
  logic [1:0] shift_en = '0;
  logic [1:0][W-1:0] recirc_in = '0;

  theseus_molecule #(.CFG_W(CW), .CID_W(1)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_data, .in_cid, .ext_valid, .ext_data, .ext_cid,
    .out_valid, .out_data, .out_cid, .nb_word, .shift_en, .recirc_in,
    .word, .built, .is_head, .cid, .overflow);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] mk(input int flag);
    return {3'(flag), CW'($urandom)};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int t = 0; t < 200; t++) begin
      int side, flag, c;
      logic [W-1:0] w0, w1;
      logic [3:0] ov;
      clear = 1; @(posedge clk); #1; clear = 0;
      check(!built && out_valid == 0, "empty after clear");
      // first word: settles
      side = $urandom_range(0, 4);        // 4 = external entry
      flag = $urandom_range(0, 4);        // 4 = end of path
      c = $urandom_range(0, 1);
      w0 = mk(flag);
      if (side == 4) begin ext_valid = 1; ext_data = w0; ext_cid = c[0]; end
      else begin in_valid[side] = 1; in_data[side] = w0; in_cid[side] = c[0]; end
      @(posedge clk); #1;
      ext_valid = 0; in_valid = '0;
      check(built && word == w0 && cid == c[0], "first word kept");
      check(is_head == (side == 4), "head only when entered from outside");
      check(out_valid == 0, "first word not forwarded");
      // second word: forwarded along the flag
      w1 = mk($urandom_range(0, 4));
      side = $urandom_range(0, 3);
      in_valid[side] = 1; in_data[side] = w1;
      @(posedge clk); #1;
      in_valid = '0;
      check(word == w0, "word kept while forwarding");
      ov = (flag == 4) ? 4'b0 : 4'(1 << flag);
      check(out_valid == ov, $sformatf("forward side %b exp %b", out_valid, ov));
      if (flag != 4) check(out_data == w1 && out_cid == c[0], "forwarded word and cell id");
      check(overflow == (flag == 4), "overflow at path end");
      @(posedge clk); #1;
      check(out_valid == 0, "forwarding lasts one cycle");
      // inspection: other cell's shift does nothing, own cell's shift moves a word in
      nb_word = {mk(0), mk(1), mk(2), mk(3)};
      recirc_in = {mk(1), mk(2)};
      shift_en = 2'(1 << (1 - c));
      @(posedge clk); #1;
      check(word == w0, "other cell's shift ignored");
      shift_en = 2'(1 << c);
      @(posedge clk); #1;
      shift_en = '0;
      check(word == ((flag == 4) ? recirc_in[c] : nb_word[flag]), "backward shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
