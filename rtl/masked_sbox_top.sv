// masked_sbox_top: the device under test of a first-order DPA experiment on
// a masked AES S-box.
//
// A stimulus sequencer enumerates every (masked input a_m, mask m) pair,
// REPEAT times each; a fresh-mask generator supplies, per stimulus, the 4-bit
// fresh mask f and an 8-bit key mask m'.  These are registered into the input
// stage together with the masked key k_m' = KEY ^ m'.  N_SBOX identical
// masked S-boxes, each followed by its own key addition/unmasking stage,
// compute Sbox(a) ^ KEY from the same inputs, and their results are
// registered in the output stage.  Only the final output is ever unmasked.
//
// Every stimulus takes two cycles in the S-boxes: a pre-charge cycle and an
// evaluation cycle.  With DUAL_RAIL = 1 (default) the S-boxes and key stages
// are the WDDL dual-rail versions: in the pre-charge cycle all their input
// rails are held at {0,0}, in the evaluation cycle they carry {v,~v}, and the
// output stage samples the true rails at the end of the evaluation cycle.
// An assertion checks that every output rail pair is {0,0} in pre-charge and
// complementary in evaluation.  With DUAL_RAIL = 0 the single-rail masked
// S-boxes are used with the same timing (the pre-charge cycle is then idle).
//
// Interface: `start` begins a run, `pause` holds it, `busy` spans it, `done`
// pulses once after the last stimulus has been issued.  A stimulus issued in
// cycle t reaches the outputs (out_valid) in cycle t+3; at most one stimulus
// is issued every two cycles.  out_a_m and out_m travel with the result so
// that the unmasked input a = out_a_m ^ out_m can be recovered when traces
// are grouped; out_new_pair marks the first of the REPEAT results of a pair
// (a trigger for averaging).
//
// Following the document: the key 8'h23, five identical S-boxes, the 8/8/4-bit
// inputs, 256 x 256 pairs and 1024 repetitions, and masked logic converted to
// WDDL for the measured device.  The register stages, the two-cycle
// pre-charge/evaluate schedule, the handshake and the mask generator are this
// design's choices.
module masked_sbox_top
  import gf_pkg::*;
  import wddl_pkg::*;
#(
  parameter int unsigned N_SBOX    = 5,
  parameter int unsigned REPEAT    = 1024,
  parameter gf256_t      KEY       = 8'h23,
  parameter logic [31:0] SEED      = 32'h1ACE_B00C,
  parameter bit          DUAL_RAIL = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   pause,
  output logic   busy,
  output logic   done,
  output logic   out_valid,
  output logic   out_new_pair,
  output gf256_t out_a_m,
  output gf256_t out_m,
  output gf256_t sbox_out [N_SBOX]
);
  typedef enum logic [1:0] {PH_IDLE, PH_PRECHARGE, PH_EVAL} phase_e;

  // Stimulus and masks
  phase_e phase;
  logic   stim_valid, stim_new_pair, stim_hold;
  gf256_t stim_a_m, stim_m;
  logic [11:0] rnd;

  // A new stimulus may enter only when the S-boxes are not in pre-charge.
  always_comb stim_hold = pause || (phase == PH_PRECHARGE);

  stimulus_ctrl #(.REPEAT(REPEAT)) u_stim (
    .clk, .rst_n, .start, .pause(stim_hold), .busy,
    .valid(stim_valid), .new_pair(stim_new_pair),
    .a_m(stim_a_m), .m(stim_m), .done
  );

  fresh_mask_gen #(.OUT_W(12), .SEED(SEED)) u_rng (
    .clk, .rst_n, .step(stim_valid), .mask_o(rnd)
  );

  // Input stage
  logic   in_new_pair;
  gf256_t in_a_m, in_m, in_key_m, in_key_mask;
  gf16_t  in_f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= PH_IDLE;
      in_new_pair <= 1'b0;
      in_a_m      <= '0;
      in_m        <= '0;
      in_f        <= '0;
      in_key_m    <= '0;
      in_key_mask <= '0;
    end else begin
      if (stim_valid) begin
        phase       <= PH_PRECHARGE;
        in_new_pair <= stim_new_pair;
        in_a_m      <= stim_a_m;
        in_m        <= stim_m;
        in_f        <= rnd[3:0];
        in_key_mask <= rnd[11:4];
        in_key_m    <= rnd[11:4] ^ KEY;
      end else if (phase == PH_PRECHARGE) begin
        phase <= PH_EVAL;
      end else begin
        phase <= PH_IDLE;
      end
    end
  end

  logic eval;
  always_comb eval = (phase == PH_EVAL);

  // S-box array
  gf256_t res [N_SBOX];

  if (DUAL_RAIL) begin : g_dual
    dr256_t dr_a_m, dr_m, dr_key_m, dr_key_mask;
    dr16_t  dr_f;
    dr256_t dr_res [N_SBOX];

    // Pre-charge gating at the register outputs: {0,0} unless evaluating.
    always_comb begin
      dr_a_m      = dr_encode8(in_a_m, eval);
      dr_m        = dr_encode8(in_m, eval);
      dr_key_m    = dr_encode8(in_key_m, eval);
      dr_key_mask = dr_encode8(in_key_mask, eval);
      dr_f        = dr_encode4(in_f, eval);
    end

    for (genvar i = 0; i < N_SBOX; i++) begin : g_sbox
      dr256_t y_m, y_mask;
      wddl_masked_sbox u_sbox (.a_m(dr_a_m), .m(dr_m), .f(dr_f), .y_m(y_m), .y_mask(y_mask));
      wddl_sbox_key_add u_key (.y_m(y_m), .y_mask(y_mask), .key_m(dr_key_m),
                               .key_mask(dr_key_mask), .out(dr_res[i]));
      always_comb
        for (int b = 0; b < 8; b++) res[i][b] = dr_res[i][b].t;

      // WDDL rule: all-zero rails in pre-charge, complementary in evaluation.
      for (genvar b = 0; b < 8; b++) begin : g_rail_chk
        assert property (@(posedge clk)
                         eval ? (dr_res[i][b].t != dr_res[i][b].f)
                              : (!dr_res[i][b].t && !dr_res[i][b].f))
          else $error("WDDL rail rule violated: S-box %0d bit %0d", i, b);
      end
    end
  end else begin : g_single
    for (genvar i = 0; i < N_SBOX; i++) begin : g_sbox
      gf256_t y_m, y_mask;
      masked_sbox u_sbox (.a_m(in_a_m), .m(in_m), .f(in_f), .y_m(y_m), .y_mask(y_mask));
      sbox_key_add u_key (.y_m(y_m), .y_mask(y_mask), .key_m(in_key_m),
                          .key_mask(in_key_mask), .out(res[i]));
    end
  end

  // Output stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      out_new_pair <= 1'b0;
      out_a_m      <= '0;
      out_m        <= '0;
      for (int i = 0; i < N_SBOX; i++) sbox_out[i] <= '0;
    end else begin
      out_valid    <= eval;
      out_new_pair <= eval && in_new_pair;
      if (eval) begin
        out_a_m <= in_a_m;
        out_m   <= in_m;
        for (int i = 0; i < N_SBOX; i++) sbox_out[i] <= res[i];
      end
    end
  end

  initial assert (N_SBOX >= 1) else $error("masked_sbox_top: N_SBOX must be at least 1");
endmodule
