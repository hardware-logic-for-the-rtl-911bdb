// trigger_top: small trigger and event selection system for a storage-ring
// detector made of two cylindrical proportional wire chambers (120 anode
// wires each, one every 3 degrees) whose cathodes are cut into 260 stripes
// across the beam axis.
//
// Data path, one step clock (10 MHz assumed):
//  1. Fast logic.  phi_telescopes on the live wire signals form the "at least
//     one track" condition; with the counter and the machine gate it gives
//     the pre-trigger, which sets the busy master flip-flop and strobes the
//     (delayed) wire and stripe signals into the event memories.
//  2. Fast parallel logic on the stored event.  A second telescope bank reads
//     the memory flip-flops; track_counting clusters and counts the tracks
//     in phi one clock after the pre-trigger and either gives the main
//     trigger or rejects the event (busy cleared).  angular_correlation gives
//     the collinearity bit.  A rejected event keeps the system busy for 3
//     clocks (300 ns).
//  3. Sequential logic.  The main trigger loads the translation registers
//     (stripes of both half-circles, both cathodes ORed) and the rotation
//     unit (wires), then one_turn_clock gives N_PHI = 120 steps: the event is
//     translated along z (the first NZ_IN = 25 steps are counted by the
//     theta-z counter) and turned 360 degrees through the wired patterns,
//     which also counts the fired wires of each chamber and the orientations
//     at which both half circles hold a track.
//  4. decision_box accepts or rejects at the end of the turn; an accepted
//     event is shifted out word by word into the derandomizing buffer, and
//     end of busy frees the system.  The computer reads the buffer through
//     rd_en / rd_data / rd_valid.
// Three example circuits of the same family that do not belong to this set-up
// stand beside it with their own ports: a three-chamber telescope bank with a
// scintillator (ex3_*), a row of 48 telescopes for two flat chambers (exf_*)
// and the scanner that finds the position along the
// wires of a plane chamber with diagonal stripes (exz_*, 16 wires, 6 z
// positions, a size of this design's choosing).
// Some block outputs are not needed at this level and stay unconnected: the
// per-pair correlation outputs, the "any track" of the stored event, the
// current pattern matches, the buffer level and the read-out activity flag.
// The block structure follows the source's diagram of this system; widths,
// clocking, the control word and the read-out format are this design's.
module trigger_top
  import trig_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // detector
  input  logic [N_WIRES-1:0]    wire_in,     // 0..119 inner, 120..239 outer chamber
  input  logic [N_STRIPES-1:0]  stripe_in,   // see trig_pkg::stripe_index
  input  logic                  counter_in,  // counter from the standard fast electronics
  input  logic                  machine_gate,
  // external controls
  input  ctrl_t                 ctrl,
  // status and data to the external controls
  output logic                  busy,
  output logic                  pretrigger,
  output logic                  any_track,     // live "at least one track"
  output logic [23:0]           pretrig_count, // rate scaler
  output logic [23:0]           lost_count,
  output logic                  main_trigger,
  output logic                  reject,
  output logic [TRK_W-1:0]      track_count,
  output logic                  collinear,
  output logic [TZC_W-1:0]      tz_count,
  output logic [7:0]            pattern_count [4],
  output logic [TRK_W-1:0]      wire_count [2],  // fired inner / outer wires
  output logic [TRK_W-1:0]      sym_count,       // orientations with tracks on both sides
  output logic                  start_readout,
  output logic                  end_busy,
  // computer interface (derandomizer read side)
  input  logic                  rd_en,
  output logic [WORD_W-1:0]     rd_data,
  output logic                  rd_valid,
  // example: three-chamber telescopes with scintillator
  input  logic                  ex3_s,
  input  logic [N_PHI-1:0]      ex3_a,
  input  logic [N_PHI-1:0]      ex3_b,
  input  logic [N_PHI-1:0]      ex3_c,
  output logic [N_PHI-1:0]      ex3_d,
  // example: telescopes for two flat chambers (48 directions)
  input  logic [95:0]           exf_a,
  input  logic [97:0]           exf_b,       // exf_b[k+1] = wire k
  output logic [47:0]           exf_d,
  // example: z along the wires of a plane chamber with two diagonal stripe
  // sets, found by shifting the event through one wired decoder
  input  logic                  exz_load,
  input  logic [15:0]           exz_wires,
  input  logic [20:0]           exz_left,
  input  logic [20:0]           exz_right,
  input  logic                  exz_scan,
  input  logic                  exz_trans,
  output logic                  exz_active,
  output logic [4:0]            exz_idx,
  output logic [4:0]            exz_off,
  output logic [5:0]            exz_z,
  output logic                  exz_valid,
  output logic [2:0]            exz_num,
  output logic                  exz_multi
);
  localparam int PAD_I = THETA_JMAX;
  localparam int PAD_O = tz_pad_o(THETA_JMAX);
  localparam int IW    = $clog2(N_PHI);

  // ---------------- 1. fast logic ----------------------------------------
  logic [N_PHI-1:0] d_live;
  logic             cond, clear;
  logic             trk_reject, dec_reject;

  phi_telescopes u_tel_live (
    .a(wire_in[N_PHI-1:0]), .b(wire_in[N_WIRES-1:N_PHI]), .acc_ctrl(ctrl.acc_ctrl),
    .d(d_live), .any_track(any_track));

  assign cond  = any_track & counter_in & machine_gate;
  assign clear = trk_reject | dec_reject | end_busy;

  pretrigger_master #(.RATE_W(24)) u_master (
    .clk, .rst_n, .cond, .clear, .pretrigger, .busy, .pretrig_count, .lost_count);

  logic [N_WIRES+N_STRIPES-1:0] delayed;
  input_delay #(.W(N_WIRES + N_STRIPES), .DELAY(1)) u_delay (
    .clk, .rst_n, .din({stripe_in, wire_in}), .dout(delayed));

  logic [N_WIRES-1:0]   wire_mem;
  logic [N_STRIPES-1:0] stripe_mem;
  logic [WORD_W-1:0]    wire_word, stripe_word;
  logic                 wire_shift, stripe_shift;

  event_memory #(.W(N_WIRES)) u_wire_mem (
    .clk, .rst_n, .load(pretrigger), .din(delayed[N_WIRES-1:0]),
    .shift(wire_shift), .q(wire_mem), .word(wire_word));
  event_memory #(.W(N_STRIPES)) u_stripe_mem (
    .clk, .rst_n, .load(pretrigger), .din(delayed[N_WIRES+N_STRIPES-1:N_WIRES]),
    .shift(stripe_shift), .q(stripe_mem), .word(stripe_word));

  // ---------------- 2. fast parallel logic on the stored event -------------
  logic [N_PHI-1:0] d_mem;
  logic             any_mem;
  logic             strobe;
  logic [5:0]       c_pair;

  phi_telescopes u_tel_mem (
    .a(wire_mem[N_PHI-1:0]), .b(wire_mem[N_WIRES-1:N_PHI]), .acc_ctrl(ctrl.acc_ctrl),
    .d(d_mem), .any_track(any_mem));

  angular_correlation u_corr (.d(d_mem), .c_pair(c_pair), .c_any(collinear));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) strobe <= 1'b0;
    else        strobe <= pretrigger;
  end

  track_counting u_trk (
    .clk, .rst_n, .d(d_mem), .strobe, .cnt_min(ctrl.trk_min), .cnt_max(ctrl.trk_max),
    .main_trigger, .reject(trk_reject), .track_count);

  // ---------------- 3. sequential logic -----------------------------------
  logic          step, turn_done;
  logic [IW-1:0] step_idx;

  one_turn_clock #(.NSTEP(N_PHI)) u_turn (
    .clk, .rst_n, .start(main_trigger), .step, .idx(step_idx), .done(turn_done));

  logic [N_THETA-1:0] tz_hit [2];
  for (genvar h = 0; h < 2; h++) begin : g_half
    logic [NZ_IN-1:0]        in_z;
    logic [NZ_OUT-1:0]       out_z;
    logic [PAD_I+NZ_IN-1:0]  in_q;
    logic [PAD_O+NZ_OUT-1:0] out_q;
    for (genvar z = 0; z < int'(NZ_IN); z++) begin : g_iz
      assign in_z[z] = stripe_mem[stripe_index(0, 0, h, z)] | stripe_mem[stripe_index(0, 1, h, z)];
    end
    for (genvar z = 0; z < int'(NZ_OUT); z++) begin : g_oz
      assign out_z[z] = stripe_mem[stripe_index(1, 0, h, z)] | stripe_mem[stripe_index(1, 1, h, z)];
    end
    translation_register #(.NZ(NZ_IN), .PAD(PAD_I)) u_tr_in (
      .clk, .rst_n, .load(main_trigger), .din(in_z), .shift(step), .q(in_q));
    translation_register #(.NZ(NZ_OUT), .PAD(PAD_O)) u_tr_out (
      .clk, .rst_n, .load(main_trigger), .din(out_z), .shift(step), .q(out_q));
    theta_z_telescopes u_tz (.in_q(in_q), .out_q(out_q), .hit(tz_hit[h]));
  end

  logic                       tz_found, tz_half;
  logic [IW-1:0]              tz_z;
  logic [$clog2(N_THETA)-1:0] tz_theta;

  theta_z_counter #(.NT(N_THETA), .ZW(IW), .ZSCAN(NZ_IN), .CW(TZC_W)) u_tzc (
    .clk, .rst_n, .clear(main_trigger), .step, .z(step_idx),
    .hit0(tz_hit[0]), .hit1(tz_hit[1]), .theta_sel(ctrl.theta_sel),
    .count(tz_count), .found(tz_found), .found_half(tz_half),
    .found_z(tz_z), .found_theta(tz_theta));

  logic [3:0] pat_match;
  rotation_pattern_unit #(.N(N_PHI)) u_rot (
    .clk, .rst_n, .load(main_trigger), .in_ring(wire_mem[N_PHI-1:0]),
    .out_ring(wire_mem[N_WIRES-1:N_PHI]), .clear(main_trigger), .step,
    .match(pat_match), .count(pattern_count),
    .wire_cnt_in(wire_count[0]), .wire_cnt_out(wire_count[1]), .sym_count);

  // ---------------- 4. decision and read-out -------------------------------
  decision_box #(.N(N_PHI), .TCW(TRK_W), .CW(TZC_W)) u_dec (
    .clk, .rst_n, .eval(turn_done), .track_count, .trk_min(ctrl.dec_trk_min),
    .d(d_mem), .phi_sel(ctrl.phi_sel), .use_phi(ctrl.use_phi),
    .copl(collinear), .use_copl(ctrl.use_copl),
    .tz_count, .tz_min(ctrl.tz_min), .use_tz(ctrl.use_tz),
    .start_readout, .reject(dec_reject));

  assign reject = trk_reject | dec_reject;

  logic              fifo_full, fifo_wr, fifo_empty, ro_active;
  logic [WORD_W-1:0] fifo_wdata;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;

  readout_system u_ro (
    .clk, .rst_n, .start(start_readout),
    .track_count(8'(track_count)), .tz_count(tz_count), .tz_found, .tz_half,
    .tz_z(5'(tz_z)), .tz_theta(5'(tz_theta)),
    .wire_word, .stripe_word, .wire_shift, .stripe_shift,
    .full(fifo_full), .wr_en(fifo_wr), .wr_data(fifo_wdata), .end_busy, .active(ro_active));

  derand_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(fifo_wr), .wr_data(fifo_wdata), .full(fifo_full),
    .rd_en, .rd_data, .empty(fifo_empty), .level(fifo_level));

  assign rd_valid = ~fifo_empty;

  // ---------------- side-by-side example circuits --------------------------
  scint_telescopes #(.N(N_PHI)) u_ex3 (.s(ex3_s), .a(ex3_a), .b(ex3_b), .c(ex3_c), .d(ex3_d));

  flat_telescopes #(.NT(48)) u_exf (.a(exf_a), .b(exf_b), .d(exf_d));

  wire_z_scanner #(.NW(16), .NZ(6)) u_exz (
    .clk, .rst_n, .load(exz_load), .wires(exz_wires), .left(exz_left), .right(exz_right),
    .scan(exz_scan), .trans(exz_trans), .wire_active(exz_active), .wire_idx(exz_idx),
    .z_off(exz_off), .z_hit(exz_z), .z_valid(exz_valid), .z_num(exz_num), .z_multi(exz_multi));
endmodule
