// tb_layer_ram: self-checking test of layer_ram. Writes random words to
// every address, reads them back in random order and checks the data one
// cycle after each read, then checks that a simultaneous read and write to
// the same address returns the old word.
//
// The one-write/one-read port memory follows the document; the read latency
// and collision behaviour checked are this design's choices.
module tb_layer_ram;
  localparam int WIDTH = 9;
  localparam int DEPTH = 37;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  layer_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = WIDTH'($urandom);
      ref_mem[a] = wr_data;
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int n = 0; n < 100; n++) begin
      int a;
      a = int'($urandom % DEPTH);
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk);
      checks++;
      if (rd_data !== ref_mem[a]) begin
        failures++;
        $display("read addr %0d got %h expected %h", a, rd_data, ref_mem[a]);
      end
    end
    // read-before-write on the same address
    rd_en = 1'b1; rd_addr = 5; wr_en = 1'b1; wr_addr = 5; wr_data = ~ref_mem[5];
    @(negedge clk);
    checks++;
    if (rd_data !== ref_mem[5]) failures++;
    ref_mem[5] = wr_data;
    wr_en = 1'b0;
    @(negedge clk);
    checks++;
    if (rd_data !== ref_mem[5]) failures++;
    // rd_en low holds the last read word
    rd_en = 1'b0; rd_addr = 6;
    @(negedge clk);
    checks++;
    if (rd_data !== ref_mem[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
