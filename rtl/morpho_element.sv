// morpho_element: one morphogenetic element (the developmental part of a cell).
//
// It decides which of four functions its cell takes, from the intensities of
// four diffusing signals and an expression table shared by all cells.
// Signalling block: cellular_input -> input_select -> decrement_compare ->
// normalize -> diffusion_memory -> cellular_output. Expression block:
// expression_table and the cell's chemical stream feed hamming_distance, whose
// result compare_distance tests against shortest_distance; best_function
// takes the function_counter value for each better match. morpho_ctrl
// sequences both; everything runs continuously, one developmental step per
// 256 clocks:
//   MC 0..3   signal k is sent (cellular_output) and received from the four
//             neighbours in molecular cycle k; the chosen neighbour intensity
//             is decremented bit-serially during the frame.
//   MC 1..4   on the first clock of MC k+1 signal k is normalised and written.
//   MC 5..14  expression: EXPR-1 cycles 6, 8, 10, 12 compute the Hamming
//             distance to entries 0..3, EXPR-0 cycles 7, 9, 11, 13 compare it
//             with the shortest distance, the first clock of the following
//             EXPR-1 cycle updates shortest distance and best entry.
//   MC 15     EXPREND: func_out takes the best entry.
// Link timing (this design's choice): a neighbour's output carries frame bit c
// during clock c+1, the input register holds it during clock c+2, so valid
// bits are examined at clock 2 and intensity bits at clocks 3..6.
//
// Interface: load (synchronous) takes diffuser_cfg and table_cfg and restarts
// development; nb_in[i] is the serial link from neighbour i (0 N, 1 E, 2 S,
// 3 W), sig_out the link to all neighbours; func_out is the cell function;
// sig exposes the stored signals; dev_done rises 4096 clocks after load.
module morpho_element
  import morpho_pkg::*;
#(
  parameter logic [NNEIGH-1:0] PRESENT = '1   // which neighbours exist
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [NSIG-1:0]   diffuser_cfg,
  input  entry_t            table_cfg [N_ENTRY],
  input  logic [NNEIGH-1:0] nb_in,
  output logic              sig_out,
  output func_t             func_out,
  output signal_t           sig [NSIG],
  output logic              dev_done
);

  ctrl_t ctrl;

  morpho_ctrl u_ctrl (
    .clk, .rst_n, .restart(load), .ctrl, .dev_done
  );

  // ---------------- signalling block ----------------
  logic              io, latch, dec_en, dec_start, wr_en;
  logic [1:0]        wr_idx;
  logic [NNEIGH-1:0] in_q;
  logic              sel_bit, any_valid, zero;
  intensity_t        sig_dec;
  logic [NSIG-1:0]   diff;
  signal_t           prev, next;
  logic              chem_bit;

  always_comb begin
    io        = (ctrl.mc < 4'(NSIG));
    latch     = io && (ctrl.clk_idx == 4'd2);
    dec_start = io && (ctrl.clk_idx == 4'd3);
    dec_en    = io && (ctrl.clk_idx >= 4'd3) && (ctrl.clk_idx <= 4'd6);
    wr_en     = (ctrl.mc >= 4'd1) && (ctrl.mc <= 4'(NSIG)) && (ctrl.clk_idx == 4'd0);
    wr_idx    = 2'(ctrl.mc - 4'd1);
  end

  cellular_input #(.PRESENT(PRESENT)) u_cin (
    .clk, .rst_n, .in(nb_in), .in_q
  );

  input_select u_isel (
    .clk, .rst_n, .latch, .in_q, .sig_out(sel_bit), .any_valid
  );

  decrement_compare u_dec (
    .clk, .rst_n, .en(dec_en), .start(dec_start), .sig_in(sel_bit), .sig_dec, .zero
  );

  assign prev = sig[wr_idx];

  normalize u_norm (
    .prev, .diff(diff[wr_idx]), .any_valid, .sig_dec, .zero, .next
  );

  diffusion_memory u_dmem (
    .clk, .rst_n, .load, .diffuser_cfg, .wr_en, .wr_idx, .wr_data(next),
    .bit_idx(ctrl.clk_idx), .sig, .diff, .chem_bit
  );

  cellular_output u_cout (
    .clk, .rst_n, .mc(ctrl.mc), .clk_idx(ctrl.clk_idx), .sig, .out(sig_out)
  );

  // ---------------- expression block ----------------
  logic  expr, hd_en, cd_en, upd, inc, expend, tbl_bit, a_gt_b;
  dist_t hd_dist, cd_dist, shortest;
  func_t fcn, best;

  always_comb begin
    expr   = !ctrl.s_f_n;
    hd_en  = expr && !ctrl.pmeven;                       // EXPR-1 cycles
    cd_en  = expr &&  ctrl.pmeven;                       // EXPR-0 cycles
    upd    = hd_en && !ctrl.pmrst && (ctrl.clk_idx == 4'd0);
    inc    = hd_en && !ctrl.pmrst && (ctrl.clk_idx == 4'(MC_LEN - 1));
    expend = ctrl.pm15 && (ctrl.clk_idx == 4'd0);
  end

  expression_table u_tbl (
    .clk, .rst_n, .load, .table_cfg, .shift(ctrl.exprtblshift), .out(tbl_bit)
  );

  hamming_distance u_ham (
    .clk, .rst_n, .en(hd_en), .first(ctrl.clk_idx == 4'd0),
    .a(chem_bit), .b(tbl_bit), .dist_q(hd_dist)
  );

  compare_distance u_cmp (
    .clk, .rst_n, .en(cd_en), .bit_idx(ctrl.clk_idx),
    .a(shortest), .b(hd_dist), .a_gt_b, .dist_q(cd_dist)
  );

  function_counter u_fcnt (
    .clk, .rst_n, .init(ctrl.pmrst), .inc, .fcn
  );

  shortest_distance u_short (
    .clk, .rst_n, .init(ctrl.pmrst), .upd, .a_gt_b, .dist_in(cd_dist), .dist_out(shortest)
  );

  best_function u_best (
    .clk, .rst_n, .init(ctrl.pmrst), .upd, .a_gt_b, .fcn_in(fcn), .expend,
    .best, .func_out
  );

endmodule
