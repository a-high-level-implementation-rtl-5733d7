// maxpool_layer: a max-pooling layer.
//
// Same three-stage organisation as mac_layer, with a single compare-and-hold
// max_unit in place of the MACs, weight memories and activation function:
//   stage 1 (layer_loader) fills the input memory and raises in_full;
//   stage 2 steps the receptive field over the output positions (row by
//           row) and, for each position, over the D input channels; for
//           each (position, channel) it reads the Fh*Fw inputs of the pool
//           one per cycle into the max unit (zero for padded positions);
//   stage 3 writes each maximum into the output memory as soon as it is
//           available, at address position*D + channel, and raises out_full
//           when the whole Hout x Wout x D volume is stored.
// One output takes Fh*Fw cycles; there is no stall because the max unit
// holds each result until the next one, at least one cycle later.
// The neuron count, MAC count and activation fields of the configuration
// are ignored. Loop order and timing are this design's choices; the
// compare-with-accumulator unit and the zero padding follow the document.
module maxpool_layer
  import ann_pkg::*;
#(
  parameter layer_cfg_t CFG        = mk_layer(L_POOL, 0, 1, 2, 2, 0, ACT_LINEAR),
  parameter dims_t      DIN        = '{h: 16'd16, w: 16'd16, d: 16'd10},
  parameter bit         STREAM_SRC = 1'b0,
  localparam int NIN  = vol(DIN),
  localparam int NOUT = vol(out_dims(CFG, DIN)),
  localparam int IAW  = clog2_1(NIN),
  localparam int OAW  = clog2_1(NOUT)
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
  // output memory, read by the next layer
  output logic               out_full,
  input  logic               out_rd_en,
  input  logic [OAW-1:0]     out_rd_addr,
  output data_t              out_rd_data,
  input  logic               out_release
);

  localparam dims_t DOUT = out_dims(CFG, DIN);
  localparam int H   = int'(DIN.h);
  localparam int W   = int'(DIN.w);
  localparam int D   = int'(DIN.d);
  localparam int HO  = int'(DOUT.h);
  localparam int WO  = int'(DOUT.w);
  localparam int FH  = int'(CFG.fh);
  localparam int FW  = int'(CFG.fw);
  localparam int STV = int'(CFG.stv);
  localparam int STH = int'(CFG.sth);
  localparam int PT  = int'(CFG.pt);
  localparam int PL  = int'(CFG.pl);

  // ---------------------------------------------------------------- stage 1
  logic              in_full, in_release;
  logic              iwr_en;
  logic [IAW-1:0]    iwr_addr;
  logic [DATA_W-1:0] iwr_data;

  layer_loader #(.N(NIN), .DW(DATA_W), .STREAM_SRC(STREAM_SRC)) u_loader (
    .clk, .rst_n,
    .s_valid, .s_data(s_data), .s_ready,
    .src_full, .src_rd_en, .src_rd_addr, .src_rd_data(src_rd_data), .src_release,
    .ram_wr_en(iwr_en), .ram_wr_addr(iwr_addr), .ram_wr_data(iwr_data),
    .in_full, .in_release
  );

  logic              ird_en;
  logic [IAW-1:0]    ird_addr;
  logic [DATA_W-1:0] ird_data;

  layer_ram #(.WIDTH(DATA_W), .DEPTH(NIN)) u_in_ram (
    .clk, .wr_en(iwr_en), .wr_addr(iwr_addr), .wr_data(iwr_data),
    .rd_en(ird_en), .rd_addr(ird_addr), .rd_data(ird_data)
  );

  // ---------------------------------------------------------------- stage 2
  typedef enum logic [1:0] {E_IDLE, E_RUN, E_WAIT_SAVE} estate_e;

  estate_e     estate;
  int unsigned oy, ox, dd, fy, fx;
  int          iy, ix;
  logic        issue, issue_first, issue_last, issue_pad;
  logic        v1, first1, last1, pad1;

  always_comb begin
    iy          = int'(oy * STV + fy) - PT;
    ix          = int'(ox * STH + fx) - PL;
    issue       = (estate == E_RUN);
    issue_first = (fy == 0) && (fx == 0);
    issue_last  = (fy == FH - 1) && (fx == FW - 1);
    issue_pad   = (iy < 0 || iy >= H || ix < 0 || ix >= W);
    ird_en      = issue && !issue_pad;
    ird_addr    = IAW'((iy * W + ix) * D + int'(dd));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      estate     <= E_IDLE;
      {oy, ox, dd, fy, fx} <= '0;
      in_release <= 1'b0;
    end else begin
      in_release <= 1'b0;
      unique case (estate)
        E_IDLE: if (in_full && !out_full) begin
          estate <= E_RUN;
          {oy, ox, dd, fy, fx} <= '0;
        end
        E_RUN: begin
          if (fx == FW - 1) begin
            fx <= 0;
            if (fy == FH - 1) begin
              fy <= 0;
              if (dd == D - 1) begin
                dd <= 0;
                if (ox == WO - 1) begin
                  ox <= 0;
                  if (oy == HO - 1) begin
                    oy         <= 0;
                    estate     <= E_WAIT_SAVE;
                    in_release <= 1'b1;
                  end else oy <= oy + 1;
                end else ox <= ox + 1;
              end else dd <= dd + 1;
            end else fy <= fy + 1;
          end else fx <= fx + 1;
        end
        E_WAIT_SAVE: if (out_full) estate <= E_IDLE;
        default: estate <= E_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, first1, last1, pad1} <= '0;
    else begin
      v1     <= issue;
      first1 <= issue_first;
      last1  <= issue_last;
      pad1   <= issue_pad;
    end
  end

  data_t max_x, max_res;
  logic  max_rv;

  assign max_x = pad1 ? data_t'(0) : data_t'(ird_data);

  max_unit #(.DW(DATA_W)) u_max (
    .clk, .rst_n,
    .valid(v1), .first(first1), .last(last1), .x(max_x),
    .result(max_res), .result_valid(max_rv)
  );

  // ---------------------------------------------------------------- stage 3
  logic [OAW-1:0] sv_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sv_addr  <= '0;
      out_full <= 1'b0;
    end else begin
      if (out_release) out_full <= 1'b0;
      if (max_rv) begin
        if (int'(sv_addr) == NOUT - 1) begin
          sv_addr  <= '0;
          out_full <= 1'b1;
        end else sv_addr <= sv_addr + 1'b1;
      end
    end
  end

  layer_ram #(.WIDTH(DATA_W), .DEPTH(NOUT)) u_out_ram (
    .clk, .wr_en(max_rv), .wr_addr(sv_addr), .wr_data(max_res),
    .rd_en(out_rd_en), .rd_addr(out_rd_addr), .rd_data(out_rd_data)
  );

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    max_rv |-> !out_full);

endmodule
