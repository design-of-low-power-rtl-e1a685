// cla_adder: pipelined carry-lookahead adder that completes a Booth
// multiply-accumulate.
//
// It adds the Booth array's SUM<14:0> and CRY<14:0> vectors and the 16-bit
// SUM_IN (the running sum from the previous filter tap) and returns the
// 16-bit result modulo 2^16. The array's vectors carry a fixed offset of
// 2^15 (see booth_rank); the adder removes it by adding a 1 at bit 15 of
// the SUM operand, where the 15-bit vector has no bit of its own.
//
// Five steps, one register after each, as five half-cycle PAL stages:
//   1. 3:2 carry-save row: SUM, CRY, SUM_IN -> s, c
//   2. bit generate g = s & c and propagate p = s ^ c
//   3. group generate/propagate of each 4-bit group
//   4. group carries by lookahead, then the carry into every bit
//   5. result = p ^ carry
// The document gives the adder its inputs, its 16-bit result and 5
// half-cycle stages; the 4-bit grouping and the content of each stage are
// this design's choice. ADD_STAGES above 5 adds buffer stages at the output.
// Timing: result for inputs applied at clock t appears after ADD_STAGES
// rising edges; a new set of inputs can enter every clock.
module cla_adder
  import pal_fir_pkg::*;
#(
  parameter int unsigned ADD_STAGES = ADD_STAGES_D
) (
  input  logic clk,
  input  logic rst_n,
  input  csv_t sum_i,    // SUM<14:0>
  input  csv_t cry_i,    // CRY<14:0>
  input  acc_t sum_in,   // SUM_IN<15:0>
  output acc_t result    // PRODUCT<15:0>
);

  localparam int unsigned GROUPS = PROD_W / 4;

  // ---- step 1: carry-save row --------------------------------------------
  acc_t op_s, op_c, s1_s, s1_c;
  acc_t csa_s, csa_c;
  assign op_s  = {1'b1, sum_i};   // 2^15 removes the array's offset
  assign op_c  = {1'b0, cry_i};
  assign csa_s = op_s ^ op_c ^ sum_in;
  assign csa_c = {((op_s[PROD_W-2:0] & op_c[PROD_W-2:0]) |
                   (op_s[PROD_W-2:0] & sum_in[PROD_W-2:0]) |
                   (op_c[PROD_W-2:0] & sum_in[PROD_W-2:0])), 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s1_s <= '0; s1_c <= '0; end
    else        begin s1_s <= csa_s; s1_c <= csa_c; end
  end

  // ---- step 2: bit generate and propagate --------------------------------
  acc_t s2_g, s2_p;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s2_g <= '0; s2_p <= '0; end
    else        begin s2_g <= s1_s & s1_c; s2_p <= s1_s ^ s1_c; end
  end

  // ---- step 3: 4-bit group generate and propagate ------------------------
  logic [GROUPS-1:0] gg, gp;
  always_comb begin
    for (int k = 0; k < int'(GROUPS); k++) begin
      gg[k] = s2_g[4*k+3]
            | (s2_p[4*k+3] & s2_g[4*k+2])
            | (s2_p[4*k+3] & s2_p[4*k+2] & s2_g[4*k+1])
            | (s2_p[4*k+3] & s2_p[4*k+2] & s2_p[4*k+1] & s2_g[4*k]);
      gp[k] = &s2_p[4*k +: 4];
    end
  end

  acc_t              s3_g, s3_p;
  logic [GROUPS-1:0] s3_gg, s3_gp;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_g <= '0; s3_p <= '0; s3_gg <= '0; s3_gp <= '0;
    end else begin
      s3_g <= s2_g; s3_p <= s2_p; s3_gg <= gg; s3_gp <= gp;
    end
  end

  // ---- step 4: lookahead carries -----------------------------------------
  logic [GROUPS:0] gc;     // carry into each group
  acc_t            bc;     // carry into each bit
  always_comb begin
    // carry into group k+1, expanded: some group j <= k generates and all
    // groups above it up to k propagate (no carry into bit 0)
    gc[0] = 1'b0;
    for (int k = 0; k < int'(GROUPS); k++) begin
      logic any_g;
      any_g = 1'b0;
      for (int j = 0; j <= k; j++) begin
        logic prop;
        prop = 1'b1;
        for (int m = j + 1; m <= k; m++) prop &= s3_gp[m];
        any_g |= s3_gg[j] & prop;
      end
      gc[k+1] = any_g;
    end
    for (int k = 0; k < int'(GROUPS); k++) begin
      bc[4*k]   = gc[k];
      bc[4*k+1] = s3_g[4*k]   | (s3_p[4*k]   & bc[4*k]);
      bc[4*k+2] = s3_g[4*k+1] | (s3_p[4*k+1] & bc[4*k+1]);
      bc[4*k+3] = s3_g[4*k+2] | (s3_p[4*k+2] & bc[4*k+2]);
    end
  end

  acc_t s4_p, s4_c;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s4_p <= '0; s4_c <= '0; end
    else        begin s4_p <= s3_p; s4_c <= bc; end
  end

  // ---- step 5: sum ---------------------------------------------------------
  acc_t s5_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s5_r <= '0;
    else        s5_r <= s4_p ^ s4_c;
  end

  pal_buffers #(.WIDTH(PROD_W), .STAGES(ADD_STAGES - ADD_STAGES_MIN)) u_pad (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (s5_r),
    .q     (result)
  );

  initial assert (ADD_STAGES >= ADD_STAGES_MIN)
    else $error("cla_adder: ADD_STAGES must be at least %0d", ADD_STAGES_MIN);

endmodule
