// Systolic array for the tracking unit of a signal-subspace mobile user
// tracker based on the modified (sample-by-sample) conjugate gradient
// algorithm, MCG.
//
// The MCG update is serial, so the array does not run the whole algorithm.
// It takes over the products that dominate its cost: v = R p (the
// matrix-vector product), p^H g and p^H v (numerator and denominator of the
// step size alpha) and g^H g (for the factor beta). The host divides,
// updates w, g and p and chooses how beta is reset.
//
// Structure, for M antennas (M^2 + M cells):
//  * an M x M grid of PE1 cells. Grid cell (k, c) holds R[c][k]. Element
//    p_k enters grid row k from the left and moves right; the partial sum
//    of v_c moves down grid column c, so v_c leaves the bottom of column c;
//  * a linear array of M PE2 cells below the grid. PE2 c takes v_c from
//    above, p_c from the right end of grid row c (it arrives there exactly
//    when v_c is finished) and g_c from an input delay line, and passes the
//    running sums pg, pv and gg to the right. The last PE2 delivers them;
//    every PE2 also puts v_c out on its extra port.
//
// Timing, one clock cycle per time step:
//  * preload: M cycles with r_load = 1. At load step t the host presents
//    column M-1-t of R on r_row (r_row[c] = R[c][M-1-t]); the columns
//    of the grid shift down by one cell. r_ready rises when M steps are in.
//  * compute: with r_ready, the host presents a whole p and g on p_vec and
//    g_vec with in_valid. Element k is delayed k cycles before it enters
//    (the systolic skew). Results appear 2M cycles later with out_valid;
//    the v elements are delayed so they appear with the inner products.
//    A new vector pair may be presented in every cycle, so N sources
//    sharing one R take M + 2M + N - 1 cycles, 3M for one.
// R must not be reloaded while vectors are in flight (busy = 1); the
// assertions below check both rules of this handshake.
//
// The cell functions, the 2D/linear arrangement, the preload time and the
// 3M-step total follow the architecture; the word formats, the handshake,
// the input skew and output alignment are this design's own.
module mcg_systolic_array
  import mts_pkg::*;
#(
  parameter int unsigned M = 4  // number of antennas
) (
  input  logic            clk,
  input  logic            rst_n,
  // preload of R
  input  logic            r_load,
  input  cdata_t [M-1:0]  r_row,
  output logic            r_ready,
  output logic            busy,
  // vectors in
  input  logic            in_valid,
  input  cdata_t [M-1:0]  p_vec,
  input  cdata_t [M-1:0]  g_vec,
  // results out
  output logic            out_valid,
  output cacc_t           pg,
  output cacc_t           pv,
  output aword_t          gg,
  output cacc_t  [M-1:0]  v_vec
);

  localparam int unsigned CW = $clog2(M + 1);
  localparam int unsigned FW = $clog2(2 * M + 2);

  // ---------------------------------------------------------------- control
  logic [CW-1:0] load_cnt;
  logic [FW-1:0] in_flight;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      load_cnt <= '0;
    end else if (r_load) begin
      // a load burst restarts the count after a complete preload
      load_cnt <= (load_cnt == CW'(M)) ? CW'(1) : load_cnt + 1'b1;
    end
  end

  assign r_ready = (load_cnt == CW'(M)) && !r_load;

  always_ff @(posedge clk) begin
    if (!rst_n) in_flight <= '0;
    else        in_flight <= in_flight + FW'(in_valid) - FW'(out_valid);
  end

  assign busy = (in_flight != '0);

  // -------------------------------------------------------------- the grid
  cdata_t r_net [M+1][M];   // r_net[k][c]: into grid cell (k, c) from above
  cdata_t p_net [M][M+1];   // p_net[k][c]: into grid cell (k, c) from left
  logic   pv_net[M][M+1];   // valid flag travelling with p
  cacc_t  v_net [M+1][M];   // v_net[k][c]: partial sum into cell (k, c)

  for (genvar c = 0; c < M; c++) begin : g_top
    assign r_net[0][c] = r_row[c];
    assign v_net[0][c] = '0;
  end

  for (genvar k = 0; k < M; k++) begin : g_skew_p
    delay_line #(.W($bits(cdata_t) + 1), .DEPTH(k)) u_skew (
      .clk, .rst_n,
      .d({in_valid, p_vec[k]}),
      .q({pv_net[k][0], p_net[k][0]})
    );
  end

  for (genvar k = 0; k < M; k++) begin : g_row
    for (genvar c = 0; c < M; c++) begin : g_col
      pe1 u_pe1 (
        .clk, .rst_n,
        .load       (r_load),
        .r_in       (r_net[k][c]),
        .r_out      (r_net[k+1][c]),
        .p_valid_in (pv_net[k][c]),
        .p_in       (p_net[k][c]),
        .p_valid_out(pv_net[k][c+1]),
        .p_out      (p_net[k][c+1]),
        .v_in       (v_net[k][c]),
        .v_out      (v_net[k+1][c])
      );
    end
  end

  // ------------------------------------------------------ the linear array
  cacc_t  pg_net [M+1];
  cacc_t  pvs_net[M+1];
  aword_t gg_net [M+1];
  logic   val_net[M+1];
  cdata_t g_skew [M];
  cacc_t  v_port [M];

  assign pg_net[0]  = '0;
  assign pvs_net[0] = '0;
  assign gg_net[0]  = '0;
  assign val_net[0] = 1'b0;

  for (genvar c = 0; c < M; c++) begin : g_lin
    // g_c must meet v_c, which leaves the grid M + c cycles after entry
    delay_line #(.W($bits(cdata_t)), .DEPTH(M + c)) u_skew_g (
      .clk, .rst_n, .d(g_vec[c]), .q(g_skew[c])
    );

    pe2 u_pe2 (
      .clk, .rst_n,
      // the valid flag of the bottom grid cell marks v_c as finished
      .v_valid_in(pv_net[M-1][c+1]),
      .v_in      (v_net[M][c]),
      .p_in      (p_net[c][M]),
      .g_in      (g_skew[c]),
      .pg_in     (pg_net[c]),
      .pv_in     (pvs_net[c]),
      .gg_in     (gg_net[c]),
      .pg_out    (pg_net[c+1]),
      .pv_out    (pvs_net[c+1]),
      .gg_out    (gg_net[c+1]),
      .valid_out (val_net[c+1]),
      .v_out     (v_port[c])
    );

    // v_c leaves PE2 c at M + c + 1 cycles; line it up with the sums at 2M
    delay_line #(.W($bits(cacc_t)), .DEPTH(M - 1 - c)) u_deskew_v (
      .clk, .rst_n, .d(v_port[c]), .q(v_vec[c])
    );
  end

  assign out_valid = val_net[M];
  assign pg        = pg_net[M];
  assign pv        = pvs_net[M];
  assign gg        = gg_net[M];

  // ------------------------------------------------------------ assertions
  a_no_vector_before_preload: assert property (
    @(posedge clk) disable iff (!rst_n) in_valid |-> r_ready)
    else $error("vector presented before R was preloaded");

  a_no_reload_in_flight: assert property (
    @(posedge clk) disable iff (!rst_n) r_load |-> !busy)
    else $error("R reloaded while vectors were in flight");

endmodule
