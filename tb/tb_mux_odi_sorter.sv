// tb_mux_odi_sorter: random sorted record lists of 8 slots, sorted by a lone
// 8-PE sorter and, independently, by two chained 4-PE slices. Each test
// removes one random slot and inserts a random new record; both outputs must
// equal the list built by deleting that slot and inserting the new record
// above every record whose key is less than or equal to its own. Keys are
// drawn from a small range so equal keys are frequent. With en = 0 the list
// must pass unchanged.
`timescale 1ns/1ps
module tb_mux_odi_sorter;
  localparam int NQ = 8, RW = 12, KW = 4, QW = 3;
  logic en;
  logic [QW-1:0] rem_pos;
  logic [RW-1:0] new_rec;
  logic [NQ-1:0][RW-1:0] data_in, data_out, chain_out, exp_out;
  int checks = 0, failures = 0;

  // lone sorter: chain boundaries tied off
  logic          u_gl, u_gr;
  logic [RW-1:0] u_dl, u_dr;
  mux_odi_sorter #(.NQ(NQ), .RW(RW), .KW(KW)) dut (
    .en, .rem_here(1'b1), .rem_right(1'b0), .rem_pos, .new_rec, .data_in, .data_out,
    .gt_left_i(1'b0), .d_left_i('0), .gt_right_i(1'b1), .d_right_i('0),
    .gt_left_o(u_gl), .d_left_o(u_dl), .gt_right_o(u_gr), .d_right_o(u_dr));

  // two chained slices: lo holds slots 0..3, hi holds slots 4..7
  logic          lo_gr, hi_gl, lo_gl, hi_gr;
  logic [RW-1:0] lo_dr, hi_dl, lo_dl, hi_dr;
  mux_odi_sorter #(.NQ(4), .RW(RW), .KW(KW)) u_lo (
    .en, .rem_here(rem_pos < 4), .rem_right(rem_pos >= 4), .rem_pos(rem_pos[1:0]),
    .new_rec, .data_in(data_in[3:0]), .data_out(chain_out[3:0]),
    .gt_left_i(1'b0), .d_left_i('0), .gt_right_i(hi_gl), .d_right_i(hi_dl),
    .gt_left_o(lo_gl), .d_left_o(lo_dl), .gt_right_o(lo_gr), .d_right_o(lo_dr));
  mux_odi_sorter #(.NQ(4), .RW(RW), .KW(KW)) u_hi (
    .en, .rem_here(rem_pos >= 4), .rem_right(1'b0), .rem_pos(rem_pos[1:0]),
    .new_rec, .data_in(data_in[7:4]), .data_out(chain_out[7:4]),
    .gt_left_i(lo_gr), .d_left_i(lo_dr), .gt_right_i(1'b1), .d_right_i('0),
    .gt_left_o(hi_gl), .d_left_o(hi_dl), .gt_right_o(hi_gr), .d_right_o(hi_dr));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [KW-1:0] keys [NQ];
      logic [RW-1:0] lst [$];
      int pos;
      foreach (keys[i]) keys[i] = KW'($urandom_range(5));
      keys.sort();
      for (int i = 0; i < NQ; i++) data_in[i] = {keys[i], (RW-KW)'($urandom)};
      new_rec = {KW'($urandom_range(6)), (RW-KW)'($urandom)};
      rem_pos = QW'($urandom);
      en = (n % 8 != 0);
      #1;
      lst.delete();
      if (en) begin
        for (int i = 0; i < NQ; i++) if (i != rem_pos) lst.push_back(data_in[i]);
        pos = 0;
        foreach (lst[i]) if (lst[i][RW-1 -: KW] <= new_rec[RW-1 -: KW]) pos = i + 1;
        lst.insert(pos, new_rec);
        for (int i = 0; i < NQ; i++) exp_out[i] = lst[i];
      end else exp_out = data_in;
      checks += 2;
      if (data_out != exp_out) begin
        failures++;
        if (failures < 10) $display("FAIL lone rem=%0d new=%h in=%h out=%h exp=%h", rem_pos, new_rec, data_in, data_out, exp_out);
      end
      if (chain_out != exp_out) begin
        failures++;
        if (failures < 10) $display("FAIL chain rem=%0d new=%h in=%h out=%h exp=%h", rem_pos, new_rec, data_in, chain_out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
