// tb_mux_sorter_pe: drives one PE through every combination of its control
// inputs with random records and checks the comparator output and the routed
// record against the PE's routing table:
//   disabled: own record;
//   removed slot: left record if the left key is greater, else the new record
//     if the right key is greater, else the right record;
//   left of the removed slot: own record if it is not greater than the new
//     one, else the new record if the left one is not greater, else left;
//   right of the removed slot: own record if it is greater than the new one,
//     else the new record if the right one is greater, else right.
`timescale 1ns/1ps
module tb_mux_sorter_pe;
  localparam int RW = 21, KW = 7;
  logic en, rem, left_of_rem, gt_left, gt_right, gt;
  logic [RW-1:0] own, new_rec, from_left, from_right, data_out;
  int checks = 0, failures = 0;

  mux_sorter_pe #(.RW(RW), .KW(KW)) dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [RW-1:0] exp_d; bit exp_gt, g;
      {en, gt_left, gt_right} = 3'($urandom);
      case ($urandom_range(2))
        0: begin rem = 1; left_of_rem = 0; end
        1: begin rem = 0; left_of_rem = 1; end
        default: begin rem = 0; left_of_rem = 0; end
      endcase
      own = RW'($urandom); new_rec = RW'($urandom);
      from_left = RW'($urandom); from_right = RW'($urandom);
      if (n % 4 == 0) new_rec[RW-1 -: KW] = own[RW-1 -: KW];   // equal keys
      #1;
      g = own[RW-1 -: KW] > new_rec[RW-1 -: KW];
      exp_gt = rem || g;
      if (!en) exp_d = own;
      else if (rem) exp_d = gt_left ? from_left : (gt_right ? new_rec : from_right);
      else if (left_of_rem) exp_d = !g ? own : (!gt_left ? new_rec : from_left);
      else exp_d = g ? own : (gt_right ? new_rec : from_right);
      checks++;
      if (gt != exp_gt || data_out != exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d gt=%0b/%0b out=%h exp %h", n, gt, exp_gt, data_out, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
