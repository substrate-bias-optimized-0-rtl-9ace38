// hca_cm_tree: five-stage Han-Carlson carry-merge tree, static-dynamic-static.
//
// Input: bitwise propagate p and generate g (active high).
// Stage 1 merges every odd bit i with bit i-1. Stages 2 to 5 are a
// Kogge-Stone tree over the odd bits only, with spans 2, 4, 8 and 16: odd
// bit i merges with odd bit i-span where that exists. After stage 5 every
// odd bit i holds the group signals G[i:0] and P[i:0]. Even bits are not
// merged here; the last merge for them (bit i with G[i-1:0]) is done in the
// carry-sum generator, the sixth stage.
//
// Stages 1, 3 and 5 are static cells (hca_cms: positive in, negative out),
// stages 2 and 4 dynamic cells (hca_cmd: negative in, positive out), so
// polarity alternates from stage to stage without extra inverters. A
// column that does not merge in a stage passes its signals through an
// inverter (a clock inverter in silicon), keeping it in step with the
// polarity of its neighbours. The outputs are therefore active low:
//   odd i : g5_n[i] = ~G[i:0],  p5_n[i] = ~P[i:0]
//   even i: g5_n[i] = ~g[i],    p5_n[i] = ~p[i]
// Purely combinational here; in silicon each stage is clocked by its own
// delayed clock phase. The width is fixed at 32 bits by the five stages.
// Stage count, stage types and the Han-Carlson pattern follow the design
// description.
`timescale 1ps/1ps
module hca_cm_tree (
  input  logic [hca_pkg::WIDTH-1:0] p,
  input  logic [hca_pkg::WIDTH-1:0] g,
  output logic [hca_pkg::WIDTH-1:0] g5_n,
  output logic [hca_pkg::WIDTH-1:0] p5_n
);
  import hca_pkg::*;

  // lvl_g[s] / lvl_p[s]: outputs of stage s (stage 0 is the input).
  // Even s is active high, odd s active low.
  logic [WIDTH-1:0] lvl_g [CM_STAGES+1];
  logic [WIDTH-1:0] lvl_p [CM_STAGES+1];

  assign lvl_g[0] = g;
  assign lvl_p[0] = p;

  for (genvar s = 1; s <= CM_STAGES; s++) begin : g_stage
    localparam int unsigned SPAN = (s == 1) ? 1 : (1 << (s - 1));
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      if ((i % 2 == 1) && (i >= SPAN)) begin : g_merge
        if (s % 2 == 1) begin : g_static
          hca_cms u_cms (
            .g_hi (lvl_g[s-1][i]),
            .p_hi (lvl_p[s-1][i]),
            .g_lo (lvl_g[s-1][i-SPAN]),
            .p_lo (lvl_p[s-1][i-SPAN]),
            .g_n  (lvl_g[s][i]),
            .p_n  (lvl_p[s][i])
          );
        end else begin : g_dynamic
          hca_cmd u_cmd (
            .g_hi_n (lvl_g[s-1][i]),
            .p_hi_n (lvl_p[s-1][i]),
            .g_lo_n (lvl_g[s-1][i-SPAN]),
            .p_lo_n (lvl_p[s-1][i-SPAN]),
            .g      (lvl_g[s][i]),
            .p      (lvl_p[s][i])
          );
        end
      end else begin : g_pass
        assign lvl_g[s][i] = ~lvl_g[s-1][i];
        assign lvl_p[s][i] = ~lvl_p[s-1][i];
      end
    end
  end

  assign g5_n = lvl_g[CM_STAGES];
  assign p5_n = lvl_p[CM_STAGES];

endmodule
