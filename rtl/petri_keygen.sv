// petri_keygen: hardware-wired Petri net that turns a master key into a
// private key.
//
// The master-key bytes S0..S(NP-1) are the initial marking of places P1..PNP
// (init_marking[0] is P1). After `start`, the net takes N firing steps, N
// being `n_steps`, and its final marking is the private key: P1 in the most
// significant byte of the NP*W marking bits, zero-extended to KEY_W bits.
// The net itself (which places feed and are fed by which transition) comes
// from the PRE/POST incidence matrices, by default the six-place,
// six-transition net of hsm_pkg; every arc has weight 1.
//
// One firing step: every transition whose input places all hold a token fires
// once, all at the same time, and every place changes by the tokens its firing
// output transitions add minus those its firing input transitions remove.
// When two transitions share an input place (T2 and T5 share P2), the lower
// numbered one has priority: a transition fires only if each of its input
// places holds more tokens than the higher-priority transitions of the same
// step already take from it, so a count never goes below zero. `conflict`
// pulses on a step where a transition with all input places marked was held
// back by that rule; `fired` shows which transitions fired on the last step.
//
// Timing: `start` in IDLE or DONE loads the initial marking and clears the
// step counter on the next edge; the next N edges each take one step; one
// edge later `done` rises and stays high, with `key` valid, until the next
// start. From the edge that samples `start` to the first cycle with `done`
// high is N+1 clock cycles. `start` while busy is ignored.
// The net, the 8-bit places, loading S into P1.. with zero in the remaining
// places, the N-step count and the 64-bit key are the published design's; the
// simultaneous-step firing rule, the priority between T2 and T5, the wrap of
// a full place and the handshake are choices of this implementation.
module petri_keygen #(
  parameter int unsigned NP      = hsm_pkg::NUM_PLACES,
  parameter int unsigned NT      = hsm_pkg::NUM_TRANS,
  parameter int unsigned W       = hsm_pkg::PLACE_W,
  parameter int unsigned COUNT_W = hsm_pkg::COUNT_W,
  parameter int unsigned KEY_W   = hsm_pkg::KEY_W,
  parameter logic [NT-1:0][NP-1:0] PRE  = hsm_pkg::PN_PRE,
  parameter logic [NT-1:0][NP-1:0] POST = hsm_pkg::PN_POST
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [NP-1:0][W-1:0]   init_marking,
  input  logic [COUNT_W-1:0]     n_steps,
  output logic                   busy,
  output logic                   done,
  output logic [KEY_W-1:0]       key,
  output logic [NP-1:0][W-1:0]   marking,
  output logic [NT-1:0]          fired,
  output logic                   conflict,
  output logic                   wrapped
);

  localparam int unsigned CNT_W = $clog2(NT + 1);

  hsm_pkg::kg_state_e state_q;
  logic      load, stepping, reached;

  logic [NP-1:0][CNT_W-1:0] n_add, n_sub;
  logic [NP-1:0]            place_wrapped;
  logic [NT-1:0]            fire;
  logic                     held_back;

  assign load     = start && (state_q != hsm_pkg::KG_FIRE);
  assign stepping = (state_q == hsm_pkg::KG_FIRE) && !reached;

  // Firing rule: one step of the net, lower transition index first.
  always_comb begin
    logic [NP-1:0][CNT_W-1:0] claimed;
    logic                     en, all_marked;
    claimed   = '0;
    n_add     = '0;
    fire      = '0;
    held_back = 1'b0;
    for (int t = 0; t < NT; t++) begin
      en         = 1'b1;
      all_marked = 1'b1;
      for (int p = 0; p < NP; p++) begin
        if (PRE[t][p]) begin
          if (marking[p] == '0) all_marked = 1'b0;
          if (int'(marking[p]) <= int'(claimed[p])) en = 1'b0;
        end
      end
      if (all_marked && !en) held_back = 1'b1;
      fire[t] = en;
      if (en) begin
        for (int p = 0; p < NP; p++) begin
          if (PRE[t][p])  claimed[p] = claimed[p] + 1'b1;
          if (POST[t][p]) n_add[p]   = n_add[p] + 1'b1;
        end
      end
    end
    n_sub = claimed;
  end

  for (genvar p = 0; p < NP; p++) begin : g_place
    pn_place #(.W(W), .CNT_W(CNT_W)) u_place (
      .clk     (clk),
      .rst_n   (rst_n),
      .load    (load),
      .init    (init_marking[p]),
      .step    (stepping),
      .n_add   (n_add[p]),
      .n_sub   (n_sub[p]),
      .tokens  (marking[p]),
      .marked  (),
      .wrapped (place_wrapped[p])
    );
  end

  fire_counter #(.W(COUNT_W)) u_counter (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (load),
    .count_up (stepping),
    .n_steps  (n_steps),
    .count    (),
    .reached  (reached)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= hsm_pkg::KG_IDLE;
      fired    <= '0;
      conflict <= 1'b0;
    end else begin
      fired    <= stepping ? fire : '0;
      conflict <= stepping && held_back;
      unique case (state_q)
        hsm_pkg::KG_IDLE: if (load)    state_q <= hsm_pkg::KG_FIRE;
        hsm_pkg::KG_FIRE: if (reached) state_q <= hsm_pkg::KG_DONE;
        hsm_pkg::KG_DONE: if (load)    state_q <= hsm_pkg::KG_FIRE;
        default:              state_q <= hsm_pkg::KG_IDLE;
      endcase
    end
  end

  assign busy    = (state_q == hsm_pkg::KG_FIRE);
  assign done    = (state_q == hsm_pkg::KG_DONE);
  assign wrapped = |place_wrapped;

  // Key: P1 in the most significant byte of the marking, zero-extended.
  always_comb begin
    key = '0;
    for (int p = 0; p < NP; p++)
      key[(NP-1-p)*W +: W] = marking[p];
  end

  initial begin
    assert (KEY_W >= NP * W) else $error("petri_keygen: KEY_W must hold the whole marking");
  end

endmodule
