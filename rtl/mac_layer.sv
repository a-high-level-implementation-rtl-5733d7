// mac_layer: a fully-connected or convolutional layer.
//
// Structure: an input memory filled by stage 1 (layer_loader), M parallel
// MAC units each with its own weight memory, a multiplexer that picks the
// MAC results one at a time, the activation function and the output
// memory. Three state machines run concurrently:
//   stage 1 (layer_loader) fills the input memory and raises in_full;
//   stage 2 (elaboration) steps the receptive field over the input volume
//           and feeds the MACs;
//   stage 3 (save) sends the M results of each iteration, one per cycle,
//           through the activation function into the output memory and
//           raises out_full once the whole output volume is stored.
//
// Elaboration order: the S neurons are split into G = ceil(S/M) groups of M
// neurons; MAC i of group g computes neuron g*M + i. For each group the
// receptive field visits every output position (row by row), so one set of
// weights serves all positions before the next group's weights are used.
// One iteration (one position, one group) takes Fh*Fw*D + 1 cycles: the bias
// first (fed as a weight on input 1.0), then the inputs of the receptive
// field in (fy, fx, d) order, one per cycle, shared by all MACs. Positions
// outside the input (the zero padding) feed 0 without reading the memory.
// A fully-connected layer is the special case whose receptive field is the
// whole input volume, giving one position per group.
// Stage 3 needs up to M cycles per iteration; if the next iteration would
// overwrite MAC results not yet saved, stage 2 holds its last term
// (stall) until stage 3 is free.
//
// Memories: inputs H*W*D words, outputs Hout*Wout*S words (channel-minor,
// see ann_pkg), weight memory of MAC i: G*(Fh*Fw*D+1) words, neuron
// g*M+i at word offset g*(Fh*Fw*D+1), bias first.
// Handshake with the neighbours: in_full/in_release (inside), out_full
// (output flag, held until the next stage pulses out_release).
// The three stages, per-MAC weight memories, output multiplexer and
// flag-based handshake follow the document; the loop order, bias handling,
// word layout and stall rule are this design's choices.
module mac_layer
  import ann_pkg::*;
#(
  parameter layer_cfg_t CFG        = mk_layer(L_CONV, 10, 5, 5, 1, 0, ACT_RELU),
  parameter dims_t      DIN        = CNN_IN,
  parameter bit         STREAM_SRC = 1'b1,
  // derived sizes, exported for the ports
  localparam int NIN  = vol(DIN),
  localparam int NOUT = vol(out_dims(CFG, DIN)),
  localparam int M    = int'(CFG.macs),
  localparam int NW   = neuron_words(CFG, DIN),
  localparam int WDEP = num_groups(CFG) * NW,
  localparam int IAW  = clog2_1(NIN),
  localparam int OAW  = clog2_1(NOUT),
  localparam int WAW  = clog2_1(WDEP),
  localparam int MAW  = clog2_1(M)
) (
  input  logic               clk,
  input  logic               rst_n,
  // stream source (first layer)
  input  logic               s_valid,
  input  data_t              s_data,
  output logic               s_ready,
  // memory source (previous layer's output memory)
  input  logic               src_full,
  output logic               src_rd_en,
  output logic [IAW-1:0]     src_rd_addr,
  input  data_t              src_rd_data,
  output logic               src_release,
  // weight load port
  input  logic               wl_en,
  input  logic [MAW-1:0]     wl_mac,
  input  logic [WAW-1:0]     wl_addr,
  input  wgt_t               wl_data,
  // output memory, read by the next layer
  output logic               out_full,
  input  logic               out_rd_en,
  input  logic [OAW-1:0]     out_rd_addr,
  output data_t              out_rd_data,
  input  logic               out_release
);

  localparam dims_t DOUT = out_dims(CFG, DIN);
  localparam int H    = int'(DIN.h);
  localparam int W    = int'(DIN.w);
  localparam int D    = int'(DIN.d);
  localparam int HO   = int'(DOUT.h);
  localparam int WO   = int'(DOUT.w);
  localparam int S    = int'(CFG.neurons);
  localparam int G    = num_groups(CFG);
  localparam int FH   = eff_fh(CFG, DIN);
  localparam int FW   = eff_fw(CFG, DIN);
  localparam int STV  = eff_stv(CFG);
  localparam int STH  = eff_sth(CFG);
  localparam int PT   = eff_pad(CFG, int'(CFG.pt));
  localparam int PL   = eff_pad(CFG, int'(CFG.pl));
  localparam int K    = FH * FW * D;
  localparam int P    = HO * WO;
  localparam int PROD_FB = DATA_FB + WGT_FB;
  localparam data_t ONE = data_t'(1 << DATA_FB);

  // ---------------------------------------------------------------- stage 1
  logic          in_full, in_release;
  logic          iwr_en;
  logic [IAW-1:0] iwr_addr;
  logic [DATA_W-1:0] iwr_data;

  layer_loader #(.N(NIN), .DW(DATA_W), .STREAM_SRC(STREAM_SRC)) u_loader (
    .clk, .rst_n,
    .s_valid, .s_data(s_data), .s_ready,
    .src_full, .src_rd_en, .src_rd_addr, .src_rd_data(src_rd_data), .src_release,
    .ram_wr_en(iwr_en), .ram_wr_addr(iwr_addr), .ram_wr_data(iwr_data),
    .in_full, .in_release
  );

  logic           ird_en;
  logic [IAW-1:0] ird_addr;
  logic [DATA_W-1:0] ird_data;

  layer_ram #(.WIDTH(DATA_W), .DEPTH(NIN)) u_in_ram (
    .clk, .wr_en(iwr_en), .wr_addr(iwr_addr), .wr_data(iwr_data),
    .rd_en(ird_en), .rd_addr(ird_addr), .rd_data(ird_data)
  );

  // ---------------------------------------------------------------- stage 2
  typedef enum logic [1:0] {E_IDLE, E_RUN, E_WAIT_SAVE} estate_e;

  estate_e     estate;
  int unsigned grp, oy, ox, fy, fx, dd, step, gbase;
  logic        saver_busy;
  logic        issue, issue_last, issue_first, issue_bias, issue_pad;
  logic        stall;
  int          iy, ix;
  logic [WAW-1:0] wrd_addr;

  // pipeline registers aligning control with the one-cycle memory read
  logic v1, first1, last1, bias1, pad1;

  always_comb begin
    iy          = int'(oy * STV + fy) - PT;
    ix          = int'(ox * STH + fx) - PL;
    issue_bias  = (step == 0);
    issue_first = issue_bias;
    issue_last  = (step == K);
    issue_pad   = !issue_bias && (iy < 0 || iy >= H || ix < 0 || ix >= W);
    stall       = (estate == E_RUN) && issue_last && saver_busy;
    issue       = (estate == E_RUN) && !stall;
    ird_en      = issue && !issue_bias && !issue_pad;
    ird_addr    = IAW'((iy * W + ix) * D + int'(dd));
    wrd_addr    = WAW'(gbase + step);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      estate     <= E_IDLE;
      {grp, oy, ox, fy, fx, dd, step, gbase} <= '0;
      in_release <= 1'b0;
    end else begin
      in_release <= 1'b0;
      unique case (estate)
        E_IDLE: if (in_full && !out_full) begin
          estate <= E_RUN;
          {grp, oy, ox, fy, fx, dd, step, gbase} <= '0;
        end
        E_RUN: if (issue) begin
          if (issue_last) begin
            // end of one iteration: next position, then next group
            step <= 0;
            {fy, fx, dd} <= '0;
            if (ox == WO - 1) begin
              ox <= 0;
              if (oy == HO - 1) begin
                oy <= 0;
                if (grp == G - 1) begin
                  estate     <= E_WAIT_SAVE;
                  in_release <= 1'b1;
                end else begin
                  grp   <= grp + 1;
                  gbase <= gbase + NW;
                end
              end else oy <= oy + 1;
            end else ox <= ox + 1;
          end else begin
            step <= step + 1;
            if (!issue_bias) begin
              if (dd == D - 1) begin
                dd <= 0;
                if (fx == FW - 1) begin
                  fx <= 0;
                  fy <= fy + 1;
                end else fx <= fx + 1;
              end else dd <= dd + 1;
            end
          end
        end
        // wait until stage 3 has stored the whole output volume
        E_WAIT_SAVE: if (out_full) estate <= E_IDLE;
        default: estate <= E_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, first1, last1, bias1, pad1} <= '0;
    else begin
      v1     <= issue;
      first1 <= issue_first;
      last1  <= issue_last;
      bias1  <= issue_bias;
      pad1   <= issue_pad;
    end
  end

  data_t mac_x;
  assign mac_x = bias1 ? ONE : (pad1 ? data_t'(0) : data_t'(ird_data));

  acc_t   mac_res [M];
  logic   [M-1:0] mac_rv;

  for (genvar i = 0; i < M; i++) begin : g_mac
    logic [WGT_W-1:0] wq;

    layer_ram #(.WIDTH(WGT_W), .DEPTH(WDEP)) u_wgt_ram (
      .clk,
      .wr_en(wl_en && int'(wl_mac) == i), .wr_addr(wl_addr), .wr_data(wl_data),
      .rd_en(issue), .rd_addr(wrd_addr), .rd_data(wq)
    );

    mac_unit #(.DW(DATA_W), .WW(WGT_W), .AW(ACC_W)) u_mac (
      .clk, .rst_n,
      .valid(v1), .first(first1), .last(last1),
      .x(mac_x), .w(wgt_t'(wq)),
      .result(mac_res[i]), .result_valid(mac_rv[i])
    );
  end

  // ---------------------------------------------------------------- stage 3
  logic        sv_active;
  int unsigned sv_idx, sv_grp, sv_pos, sv_n;
  acc_t        mux_out;
  data_t       act_out;
  logic        owr_en;
  logic [OAW-1:0] owr_addr;

  // MAC results still to be saved, or about to appear
  assign saver_busy = sv_active || mac_rv[0] || (v1 && last1);
  // number of real neurons in the group being saved
  assign sv_n = (S - sv_grp * M < M) ? S - sv_grp * M : M;

  // the "MAC address" multiplexer
  assign mux_out = mac_res[sv_idx];

  activation_unit #(.ACT(CFG.act), .IW(ACC_W), .IFB(PROD_FB), .OW(DATA_W), .OFB(DATA_FB))
    u_act (.z(mux_out), .y(act_out));

  assign owr_en   = sv_active;
  assign owr_addr = OAW'(sv_pos * S + sv_grp * M + sv_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sv_active <= 1'b0;
      {sv_idx, sv_grp, sv_pos} <= '0;
      out_full  <= 1'b0;
    end else begin
      if (out_release) out_full <= 1'b0;
      if (!sv_active) begin
        if (mac_rv[0]) begin
          sv_active <= 1'b1;
          sv_idx    <= 0;
        end
      end else if (sv_idx == sv_n - 1) begin
        sv_active <= 1'b0;
        sv_idx    <= 0;
        if (sv_pos == P - 1) begin
          sv_pos <= 0;
          if (sv_grp == G - 1) begin
            sv_grp   <= 0;
            out_full <= 1'b1;
          end else sv_grp <= sv_grp + 1;
        end else sv_pos <= sv_pos + 1;
      end else sv_idx <= sv_idx + 1;
    end
  end

  layer_ram #(.WIDTH(DATA_W), .DEPTH(NOUT)) u_out_ram (
    .clk, .wr_en(owr_en), .wr_addr(owr_addr), .wr_data(act_out),
    .rd_en(out_rd_en), .rd_addr(out_rd_addr), .rd_data(out_rd_data)
  );

  // ------------------------------------------------------------ assertions
  // the output memory is only written while its flag is low
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    owr_en |-> !out_full);
  // a new set of MAC results never arrives while the previous one is saved
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    mac_rv[0] |-> !sv_active);

endmodule
