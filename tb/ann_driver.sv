// ann_driver: stimulus and checking for a complete network (ann_top),
// shared by the network-level testbenches. It connects to the network's
// ports; the testbench instantiates both, so the network itself can be
// used with or without a parameter list.
//
// After reset it draws random weights for every layer, streams them in
// (checking meanwhile that the input port stays closed), then sends RUNS
// random input volumes back to back while a second process waits for each
// result, holds it for HOLD cycles (so the layers behind it must wait),
// reads the whole output memory, compares it with the reference model and
// releases it. It reports the number of checks and failures, the cycles
// from the first input word to the first complete result (latency) and
// the average distance between successive results (interval).
//
// The random weights and inputs, the hold time and the measured quantities
// are test choices; the expected values follow the layer arithmetic of the
// design (see ann_model_pkg).
module ann_driver
  import ann_pkg::*;
  import ann_model_pkg::*;
#(
  parameter net_cfg_t NET  = cnn_setup_a(),
  parameter int       NL   = 3,
  parameter dims_t    DIN0 = CNN_IN,
  parameter int       RUNS = 2,
  parameter int       HOLD = 0,
  localparam int OUT_N     = vol(layer_in_dims(NET, DIN0, NL)),
  localparam int OAW       = clog2_1(OUT_N)
) (
  input  logic           clk,
  output logic           rst_n,
  output logic           w_valid,
  output wgt_t           w_data,
  input  logic           w_ready,
  input  logic           loaded,
  output logic           in_valid,
  output data_t          in_data,
  input  logic           in_ready,
  input  logic           out_full,
  output logic           out_rd_en,
  output logic [OAW-1:0] out_rd_addr,
  input  data_t          out_rd_data,
  output logic           out_release,
  output int             checks,
  output int             failures,
  output int             latency,
  output int             interval,
  output bit             done
);

  localparam int NIN = vol(DIN0);

  ivec_t wts [MAX_LAYERS];
  ivec_t exp_q [$];
  longint cycle = 0;
  longint t_first_in, t_first_out, t_last_out;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // reference: run the whole network on x
  function automatic ivec_t model_net(ivec_t x);
    ivec_t v;
    int h, w, d, ho, wo, dout;
    v = x;
    h = DIN0.h; w = DIN0.w; d = DIN0.d;
    for (int l = 0; l < NL; l++) begin
      v = model_layer(NET[l], h, w, d, v, wts[l]);
      model_dims(NET[l], h, w, d, ho, wo, dout);
      h = ho; w = wo; d = dout;
    end
    return v;
  endfunction

  initial begin
    int h, w, d, ho, wo, dout;
    rst_n = 1'b0; w_valid = 1'b0; w_data = '0; in_valid = 1'b0; in_data = '0;
    out_rd_en = 1'b0; out_rd_addr = '0; out_release = 1'b0;
    checks = 0; failures = 0; latency = 0; interval = 0; done = 1'b0;
    // weights: biases and weights drawn small, ~ +-0.5 in 5-bit fraction
    h = DIN0.h; w = DIN0.w; d = DIN0.d;
    for (int l = 0; l < NL; l++) begin
      wts[l] = new[model_nweights(NET[l], h, w, d)];
      foreach (wts[l][i]) wts[l][i] = rnd_val(-16, 16);
      model_dims(NET[l], h, w, d, ho, wo, dout);
      h = ho; w = wo; d = dout;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // weight stream, in_ready must stay low meanwhile
    for (int l = 0; l < NL; l++)
      foreach (wts[l][i]) begin
        bit acc;
        w_valid = 1'b1; w_data = wgt_t'(wts[l][i]);
        in_valid = 1'b1;
        do begin
          acc = w_ready;
          if (in_ready) begin
            failures++;
            $display("FAIL: input accepted before the weights were loaded");
          end
          @(negedge clk);
        end while (!acc);
      end
    w_valid = 1'b0;
    in_valid = 1'b0;
    @(negedge clk);
    chk(loaded, "weights loaded");
    chk(!w_ready, "weight port closed after loading");

    fork
      // input feeder
      begin
        for (int r = 0; r < RUNS; r++) begin
          ivec_t x;
          x = new[NIN];
          foreach (x[i]) x[i] = rnd_val(-64, 64);
          exp_q.push_back(model_net(x));
          for (int k = 0; k < NIN; k++) begin
            bit acc;
            in_valid = 1'b1; in_data = data_t'(x[k]);
            do begin
              acc = in_ready;
              @(negedge clk);
            end while (!acc);
            if (r == 0 && k == 0) t_first_in = cycle;
          end
          in_valid = 1'b0;
        end
      end
      // output checker
      begin
        for (int r = 0; r < RUNS; r++) begin
          ivec_t y;
          while (!out_full) @(negedge clk);
          if (r == 0) t_first_out = cycle;
          t_last_out = cycle;
          repeat (HOLD) @(negedge clk);
          wait (exp_q.size() > 0);
          y = exp_q.pop_front();
          for (int a = 0; a < OUT_N; a++) begin
            out_rd_en = 1'b1; out_rd_addr = OAW'(a);
            @(negedge clk);
            chk(int'(out_rd_data) == y[a],
                $sformatf("run %0d output %0d got %0d expected %0d", r, a, out_rd_data, y[a]));
          end
          out_rd_en = 1'b0;
          out_release = 1'b1;
          @(negedge clk);
          out_release = 1'b0;
          @(negedge clk);
        end
      end
    join
    latency  = int'(t_first_out - t_first_in);
    interval = (RUNS > 1) ? int'((t_last_out - t_first_out) / (RUNS - 1)) : 0;
    done = 1'b1;
  end

endmodule
