// bist_top: built-in self-test of an 8x8 multiplier with a low-power pattern
// generator.
//
// Two low-power LFSR pattern generators (lp_lfsr) produce operands a and b.
// Both go to a reference multiplier and to the multiplier under test (CUT),
// which is the array multiplier or the Booth multiplier as chosen by
// `cut_sel`. Each product is captured in its own 16-bit parallel-in
// parallel-out register, and the comparator checks the two registers. The
// control unit (bcu) drives the generators' four-step half-enable sequence,
// loads the registers, counts the patterns and ends the test.
//
// Timing: on each RUN clock the registers capture the products of the
// operands present before the edge while the generators step to the next
// vector; the comparison of those products is valid one clock later
// (`compare_valid`). A test of NUM_PATTERNS vectors raises `bist_done` after
// NUM_PATTERNS + 2 clock edges, counting the edge that first sees `enable`.
//
// `booth_signed` puts the Booth multiplier in two's complement mode. The
// reference multiplier is unsigned, so a signed test reports mismatches for
// every pattern with a set sign bit; that is the expected response, and it
// shows that the checker catches wrong products. Selecting the CUT with a mux,
// the seeds, the polynomial and the test length are this design's choices;
// the block structure follows the document.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned  N            = 8,
  parameter logic [N-1:0] TAPS         = 8'b1011_1000,
  parameter logic [N-1:0] SEED_A       = 8'h01,
  parameter logic [N-1:0] SEED_B       = 8'h01,
  parameter int unsigned  NUM_PATTERNS = 1020
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             cut_sel,
  input  logic             booth_signed,
  output logic [N-1:0]     in1_cut,
  output logic [N-1:0]     in2_cut,
  output logic [2*N-1:0]   product_cut,
  output logic [2*N-1:0]   tpa_in,
  output logic [2*N-1:0]   tpa_ref_in,
  output logic             tpa_out,
  output logic             compare_valid,
  output logic [CNT_W-1:0] count,
  output logic [CNT_W-1:0] err_count,
  output logic             bist_done,
  output logic             bist_fail
);

  logic tpg_en, en1, en2, capture, clr;
  logic [2*N-1:0] p_array, p_booth, p_ref;

  bcu #(.NUM_PATTERNS(NUM_PATTERNS)) u_bcu (
    .clk           (clk),
    .rst_n         (rst_n),
    .enable        (enable),
    .tpg_en        (tpg_en),
    .en1           (en1),
    .en2           (en2),
    .capture       (capture),
    .compare_valid (compare_valid),
    .clr           (clr),
    .count         (count),
    .done          (bist_done)
  );

  lp_lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED_A)) u_tpg_a (
    .clk    (clk),
    .rst_n  (rst_n),
    .tpg_en (tpg_en),
    .en1    (en1),
    .en2    (en2),
    .tv     (in1_cut)
  );

  lp_lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED_B)) u_tpg_b (
    .clk    (clk),
    .rst_n  (rst_n),
    .tpg_en (tpg_en),
    .en1    (en1),
    .en2    (en2),
    .tv     (in2_cut)
  );

  ref_mult #(.N(N)) u_ref (
    .a (in1_cut),
    .b (in2_cut),
    .p (p_ref)
  );

  array_mult #(.N(N)) u_array (
    .x (in1_cut),
    .y (in2_cut),
    .z (p_array)
  );

  booth_mult #(.N(N)) u_booth (
    .x  (in1_cut),
    .y  (in2_cut),
    .tc (booth_signed),
    .p  (p_booth)
  );

  assign product_cut = cut_sel ? p_booth : p_array;

  pipo_reg #(.W(2*N)) u_reg_ref (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (capture),
    .d     (p_ref),
    .q     (tpa_ref_in)
  );

  pipo_reg #(.W(2*N)) u_reg_cut (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (capture),
    .d     (product_cut),
    .q     (tpa_in)
  );

  comparator #(.W(2*N)) u_cmp (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (clr),
    .valid     (compare_valid),
    .actual    (tpa_in),
    .expected  (tpa_ref_in),
    .match     (tpa_out),
    .err_count (err_count),
    .fail      (bist_fail)
  );

endmodule
