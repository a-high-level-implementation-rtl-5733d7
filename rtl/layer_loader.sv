// layer_loader: stage 1 of a layer. It copies the layer's N inputs, one
// per clock cycle, into the layer's input memory and then raises the
// input-ready flag in_full.
//
// in_full is a set-reset flag: this stage sets it when the input memory
// holds a complete input volume, and the elaboration stage clears it with
// a one-cycle in_release pulse once it has read everything it needs. While
// the flag is high the memory is in use and nothing is written; while it is
// low the memory may be overwritten.
// Two sources are supported, chosen by STREAM_SRC:
//   STREAM_SRC = 0  the previous layer's output memory. When its flag
//                   src_full is high and in_full is low, addresses 0..N-1
//                   are read (one-cycle read latency) and written to the
//                   same addresses; then src_release pulses to clear the
//                   previous layer's flag and in_full is set. N+1 cycles.
//   STREAM_SRC = 1  the network's input port, a valid/ready stream; word k
//                   of the stream goes to address k, in_full is set after
//                   the N-th word is accepted. s_ready = !in_full.
// The flag protocol follows the document; the stream port and the cycle
// timing are this design's choices.
module layer_loader #(
  parameter int N          = 400,
  parameter int DW         = 9,
  parameter bit STREAM_SRC = 1'b0,
  localparam int AW        = (N <= 1) ? 1 : $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // stream source
  input  logic          s_valid,
  input  logic [DW-1:0] s_data,
  output logic          s_ready,
  // memory source (previous layer's output memory)
  input  logic          src_full,
  output logic          src_rd_en,
  output logic [AW-1:0] src_rd_addr,
  input  logic [DW-1:0] src_rd_data,
  output logic          src_release,
  // input memory write port
  output logic          ram_wr_en,
  output logic [AW-1:0] ram_wr_addr,
  output logic [DW-1:0] ram_wr_data,
  // input-ready flag
  output logic          in_full,
  input  logic          in_release
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAIN} state_e;

  state_e        state;
  logic [AW-1:0] cnt;
  logic          rd_pending;
  logic [AW-1:0] rd_pending_addr;
  logic          set_full;

  assign s_ready = STREAM_SRC && !in_full;

  // Memory-source read side.
  assign src_rd_en   = !STREAM_SRC && (state == S_READ);
  assign src_rd_addr = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      cnt             <= '0;
      rd_pending      <= 1'b0;
      rd_pending_addr <= '0;
      src_release     <= 1'b0;
    end else begin
      src_release     <= 1'b0;
      rd_pending      <= src_rd_en;
      rd_pending_addr <= cnt;
      if (STREAM_SRC) begin
        if (s_valid && s_ready)
          cnt <= (int'(cnt) == N - 1) ? '0 : cnt + 1'b1;
      end else begin
        unique case (state)
          S_IDLE: if (src_full && !in_full) begin
            state <= S_READ;
            cnt   <= '0;
          end
          S_READ: begin
            if (int'(cnt) == N - 1) state <= S_DRAIN;
            else cnt <= cnt + 1'b1;
          end
          S_DRAIN: begin
            state       <= S_IDLE;
            cnt         <= '0;
            src_release <= 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // Input-memory write side.
  always_comb begin
    if (STREAM_SRC) begin
      ram_wr_en   = s_valid && s_ready;
      ram_wr_addr = cnt;
      ram_wr_data = s_data;
      set_full    = s_valid && s_ready && (int'(cnt) == N - 1);
    end else begin
      ram_wr_en   = rd_pending;
      ram_wr_addr = rd_pending_addr;
      ram_wr_data = src_rd_data;
      set_full    = (state == S_DRAIN);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          in_full <= 1'b0;
    else if (set_full)   in_full <= 1'b1;
    else if (in_release) in_full <= 1'b0;
  end

endmodule
