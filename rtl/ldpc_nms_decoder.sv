// ldpc_nms_decoder: layered Normalized Min-Sum decoder for the CCSDS (128,64)
// LDPC code, soft 3-bit input, hard output.
//
// How it works. Each variable keeps an a-posteriori value APP (APP_W bits,
// saturating to +-(2^(APP_W-1)-1)), loaded with the channel LLR shifted left
// by FRAC so that the 3/4 normalisation keeps resolution; each edge keeps
// its last check-to-variable message R (R_W bits). One block row of H (16 checks of degree 8) is processed per clock by
// 16 check-node units in parallel, so one iteration takes 4 clocks. For every
// edge of the layer the variable-to-check value is Q = sat(APP - R_old); a
// check-node unit finds the two smallest |Q|, the sign product, and returns
// R_new = sign * floor(3 * min(|Q|excl, R_MAX) / 4), R_MAX = 2^(R_W-1)-1.
// Every variable then takes APP += sum of (R_new - R_old) over its edges in
// this layer, saturated; in the I + P^s blocks a variable has two edges in
// the same layer and both changes are added. Before each iteration the
// syndrome of the hard decisions (sign of APP) is checked; decoding stops
// when it is zero or after MAX_ITER iterations.
//
// Interface and timing. start (one clock) loads llr (element i in bits
// [i*M1 +: M1], two's complement, positive means bit 0) and clears all R.
// done rises at the clock edge 1 + 4*iters edges after the one that samples
// start; bits, iters and parity_ok are valid from done until the next start.
// busy is high in between; start is ignored while busy.
//
// The code, the Normalized Min-Sum rule, 3-bit soft input and hard output
// follow the verification flow this decoder was built for. The layered
// schedule, the normalisation factor, the word widths, MAX_ITER and the
// start/done handshake are this design's own choices.
module ldpc_nms_decoder
  import ldpc_pkg::*;
#(
  parameter int N        = 128,  // code length (fixed by the code tables)
  parameter int M1       = 3,    // bits per input LLR
  parameter int MAX_ITER = 10,   // iteration limit
  parameter int APP_W    = 8,    // a-posteriori value width
  parameter int R_W      = 6,    // check message width
  parameter int FRAC     = 2,    // fraction bits added to the input LLR
  localparam int ITER_W  = iter_width(MAX_ITER)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N*M1-1:0]   llr,
  output logic              busy,
  output logic              done,
  output logic [N-1:0]      bits,
  output logic [ITER_W-1:0] iters,
  output logic              parity_ok
);

  localparam int APP_MAX = (1 << (APP_W - 1)) - 1;
  localparam int R_MAX   = (1 << (R_W - 1)) - 1;

  typedef logic signed [APP_W-1:0] app_t;
  localparam logic signed [APP_W+1:0] Q_MAX   = (APP_W+2)'(APP_MAX);
  localparam logic signed [APP_W+4:0] ACC_MAX = (APP_W+5)'(APP_MAX);
  localparam logic [APP_W-1:0]        M_MAX   = APP_W'(R_MAX);
  typedef logic signed [R_W-1:0]   rmsg_t;
  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t            state;
  logic [1:0]        layer;
  logic [ITER_W-1:0] iter;
  app_t              app  [N];
  rmsg_t             rmsg [NB_ROW][Z][DC];

  // ---------------------------------------------------------------- syndrome
  logic [N-1:0]      hard;
  logic [CODE_M-1:0] syn;
  logic              syn_ok;

  always_comb begin
    for (int v = 0; v < N; v++) hard[v] = app[v][APP_W-1];
    for (int l = 0; l < NB_ROW; l++)
      for (int k = 0; k < Z; k++) begin
        syn[l*Z+k] = 1'b0;
        for (int e = 0; e < DC; e++) syn[l*Z+k] ^= hard[vn_index(2'(l), k, 3'(e))];
      end
    syn_ok = (syn == '0);
  end

  // ------------------------------------------------------ layer selection
  // Each layer's edge-to-variable wiring is fixed; the layer counter picks
  // one of the four wirings (a 4:1 select per edge).
  app_t  app_in [Z][DC];   // APP of the variable on each edge of the layer
  rmsg_t r_old  [Z][DC];   // stored message of each edge of the layer

  always_comb begin
    for (int k = 0; k < Z; k++)
      for (int e = 0; e < DC; e++) begin
        app_in[k][e] = '0;
        r_old[k][e]  = rmsg[layer][k][e];
      end
    for (int l = 0; l < NB_ROW; l++)
      if (layer == 2'(l))
        for (int k = 0; k < Z; k++)
          for (int e = 0; e < DC; e++)
            app_in[k][e] = app[vn_index(2'(l), k, 3'(e))];
  end

  // ------------------------------------------------ check-node units (Z)
  rmsg_t               r_new [Z][DC];
  logic signed [R_W:0] delta [Z][DC];  // R_new - R_old

  always_comb begin
    logic signed [APP_W+1:0] q;
    logic [APP_W-1:0]        mag [DC];
    logic                    sgn [DC];
    logic [APP_W-1:0]        min1, min2, m;
    int unsigned             idx1;
    logic                    sprod;
    logic [R_W-1:0]          scaled;  // 3*min/4 < R_MAX

    for (int k = 0; k < Z; k++) begin
      min1 = APP_W'(APP_MAX);
      min2 = APP_W'(APP_MAX);
      idx1 = 0;
      sprod = 1'b0;
      for (int e = 0; e < DC; e++) begin
        q = (APP_W+2)'(app_in[k][e]) - (APP_W+2)'(r_old[k][e]);
        if (q > Q_MAX)       q = Q_MAX;
        else if (q < -Q_MAX) q = -Q_MAX;
        sgn[e]  = q[APP_W+1];
        mag[e]  = sgn[e] ? APP_W'(-q) : APP_W'(q);
        sprod  ^= sgn[e];
        if (mag[e] < min1) begin
          min2 = min1;
          min1 = mag[e];
          idx1 = e;
        end else if (mag[e] < min2) begin
          min2 = mag[e];
        end
      end
      for (int e = 0; e < DC; e++) begin
        m = (e == idx1) ? min2 : min1;
        if (m > M_MAX) m = M_MAX;
        scaled = R_W'(((R_W+2)'(m) * 3) >> 2);
        r_new[k][e] = (sprod ^ sgn[e]) ? -rmsg_t'(scaled) : rmsg_t'(scaled);
        delta[k][e] = (R_W+1)'(r_new[k][e]) - (R_W+1)'(r_old[k][e]);
      end
    end
  end

  // ------------------------------------------------------ variable update
  // Variable j of block column b meets edge e of layer l (when that edge
  // lies in column b) at check row (j - shift) mod Z: fixed wiring per layer.
  typedef logic signed [R_W:0] delta_t;

  function automatic app_t var_update(app_t a, logic [1:0] lay, int b, int j,
                                      delta_t d [Z][DC]);
    logic signed [APP_W+4:0] acc;
    acc = (APP_W+5)'(a);
    for (int l = 0; l < NB_ROW; l++)
      if (lay == 2'(l))
        for (int e = 0; e < DC; e++)
          if (int'(H_BASE[l][e].bcol) == b)
            acc += (APP_W+5)'(d[(j - int'(H_BASE[l][e].shift) + Z) % Z][e]);
    if (acc > ACC_MAX)       return app_t'(ACC_MAX);
    else if (acc < -ACC_MAX) return app_t'(-ACC_MAX);
    else                     return app_t'(acc);
  endfunction

  app_t app_new [N];

  for (genvar b = 0; b < NB_COL; b++) begin : g_col
    for (genvar j = 0; j < Z; j++) begin : g_var
      assign app_new[b*Z+j] = var_update(app[b*Z+j], layer, b, j, delta);
    end
  end

  // ------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      layer     <= '0;
      iter      <= '0;
      done      <= 1'b0;
      iters     <= '0;
      parity_ok <= 1'b0;
      for (int v = 0; v < N; v++) app[v] <= '0;
      for (int l = 0; l < NB_ROW; l++)
        for (int k = 0; k < Z; k++)
          for (int e = 0; e < DC; e++) rmsg[l][k][e] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          layer <= '0;
          iter  <= '0;
          for (int v = 0; v < N; v++)
            app[v] <= app_t'($signed(llr[v*M1 +: M1])) <<< FRAC;
          for (int l = 0; l < NB_ROW; l++)
            for (int k = 0; k < Z; k++)
              for (int e = 0; e < DC; e++) rmsg[l][k][e] <= '0;
        end
        S_RUN: begin
          if (layer == 2'd0 && (syn_ok || iter == ITER_W'(MAX_ITER))) begin
            state     <= S_IDLE;
            done      <= 1'b1;
            iters     <= iter;
            parity_ok <= syn_ok;
          end else begin
            for (int v = 0; v < N; v++) app[v] <= app_new[v];
            for (int k = 0; k < Z; k++)
              for (int e = 0; e < DC; e++) rmsg[layer][k][e] <= r_new[k][e];
            layer <= layer + 2'd1;
            if (layer == 2'(NB_ROW - 1)) iter <= iter + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN);
  assign bits = hard;

  initial begin
    assert (N == CODE_N) else $fatal(1, "N must be %0d for this code", CODE_N);
    assert (M1 + FRAC < APP_W) else $fatal(1, "M1 wider than APP_W");
  end

endmodule
