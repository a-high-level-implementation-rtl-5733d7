// tb_layer_loader: self-checking test of layer_loader with both sources.
//  - memory source (N = 13): a model of the previous layer's output memory
//    with one-cycle read latency; checks every word lands at its address
//    in the input memory, that in_full rises N+2 cycles after src_full,
//    that src_release pulses once, and that nothing is loaded while
//    in_full is high (back-pressure) until in_release clears it.
//  - stream source (N = 11): random valid gaps; checks the words land in
//    order, that in_full rises with the N-th word and that s_ready then
//    stays low until in_release.
//
// The set/reset flag behaviour follows the document; the stream port and
// the cycle counts checked are this design's choices.
module tb_layer_loader;
  localparam int N1 = 13, N2 = 11;
  localparam int A1 = $clog2(N1), A2 = $clog2(N2);

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // memory-source instance
  logic          src_full = 1'b0, src_rd_en, src_release, in_full1, in_release1 = 1'b0;
  logic [A1-1:0] src_rd_addr, wa1;
  logic [8:0]    src_rd_data, wd1;
  logic          we1;
  logic [8:0]    src_mem [N1];
  logic [8:0]    got1 [N1];
  int            rel_count = 0, wr_count1 = 0;

  layer_loader #(.N(N1), .DW(9), .STREAM_SRC(1'b0)) u_mem (
    .clk, .rst_n, .s_valid(1'b0), .s_data('0), .s_ready(),
    .src_full, .src_rd_en, .src_rd_addr, .src_rd_data, .src_release,
    .ram_wr_en(we1), .ram_wr_addr(wa1), .ram_wr_data(wd1),
    .in_full(in_full1), .in_release(in_release1)
  );

  always_ff @(posedge clk) if (src_rd_en) src_rd_data <= src_mem[src_rd_addr];
  always_ff @(posedge clk) begin
    if (we1 && rst_n) begin got1[wa1] <= wd1; wr_count1 <= wr_count1 + 1; end
    if (src_release && rst_n) rel_count <= rel_count + 1;
  end

  // stream-source instance
  logic          s_valid = 1'b0, s_ready, in_full2, in_release2 = 1'b0, we2;
  logic [8:0]    s_data = '0, wd2;
  logic [A2-1:0] wa2;
  logic [8:0]    got2 [N2];

  layer_loader #(.N(N2), .DW(9), .STREAM_SRC(1'b1)) u_str (
    .clk, .rst_n, .s_valid, .s_data, .s_ready,
    .src_full(1'b0), .src_rd_en(), .src_rd_addr(), .src_rd_data('0), .src_release(),
    .ram_wr_en(we2), .ram_wr_addr(wa2), .ram_wr_data(wd2),
    .in_full(in_full2), .in_release(in_release2)
  );
  always_ff @(posedge clk) if (we2) got2[wa2] <= wd2;

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic mem_round(int round);
    int cyc;
    for (int a = 0; a < N1; a++) src_mem[a] = 9'($urandom);
    src_full = 1'b1;
    cyc = 0;
    @(negedge clk);
    cyc++;
    while (!in_full1) begin @(negedge clk); cyc++; end
    chk(cyc == N1 + 2, $sformatf("in_full after %0d cycles, expected %0d", cyc, N1 + 2));
    @(negedge clk);
    chk(rel_count == round + 1, $sformatf("src_release count %0d", rel_count));
    chk(wr_count1 == N1 * (round + 1), $sformatf("write count %0d", wr_count1));
    for (int a = 0; a < N1; a++) chk(got1[a] == src_mem[a], $sformatf("mem word %0d", a));
    src_full = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // memory source
    mem_round(0);
    // previous layer offers a new volume while the input memory is full
    src_full = 1'b1;
    for (int a = 0; a < N1; a++) src_mem[a] = 9'($urandom);
    repeat (30) @(negedge clk);
    chk(wr_count1 == N1, "no load while in_full is high");
    chk(in_full1, "in_full held");
    src_full = 1'b0;
    in_release1 = 1'b1;
    @(negedge clk);
    in_release1 = 1'b0;
    chk(!in_full1, "in_release clears in_full");
    mem_round(1);

    // stream source
    for (int r = 0; r < 2; r++) begin
      logic [8:0] vals [N2];
      int k;
      for (int a = 0; a < N2; a++) vals[a] = 9'($urandom);
      k = 0;
      while (k < N2) begin
        s_valid = ($urandom % 3 != 0);
        s_data  = vals[k];
        chk(s_ready, "s_ready while loading");
        @(negedge clk);
        if (s_valid) k++;
      end
      s_valid = 1'b0;
      chk(in_full2, "in_full after N words");
      chk(!s_ready, "s_ready low when full");
      for (int a = 0; a < N2; a++) chk(got2[a] == vals[a], $sformatf("stream word %0d", a));
      repeat (5) @(negedge clk);
      chk(in_full2 && !s_ready, "stream holds while full");
      in_release2 = 1'b1;
      @(negedge clk);
      in_release2 = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
