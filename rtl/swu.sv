// swu: sliding window unit of a streaming KxK convolution (stride 1, no
// padding).
//
// Input pixels arrive in row-major order, one pixel (all CH channels, B bits
// each) per accepted transfer. The unit keeps the last K rows in a circular
// line buffer of K x DIM pixels. When the pixel at row r, column c arrives
// with r >= K-1 and c >= K-1, the KxK window whose bottom-right corner it is
// is complete; the unit emits it in the same cycle into its output register.
//
// Window layout: element e = (dr*K + dc)*CH + ch occupies
// out_data[e*B +: B], with dr = 0 the oldest row and dc = 0 the leftmost
// column of the window. This order matches the weight rows of mvtu.
//
// Handshake: valid/ready on both sides. A pixel is accepted while the output
// register is empty or being drained, so one window per cycle can pass.
// Output DIM-K+1 squared windows per image; counters wrap after the last
// pixel so images follow back to back. The sizes are parameters; the
// buffering scheme is this design's own choice.
module swu #(
  parameter int unsigned DIM = 32,
  parameter int unsigned CH  = 3,
  parameter int unsigned B   = 8,
  parameter int unsigned K   = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [CH*B-1:0]        in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [K*K*CH*B-1:0]    out_data
);
  localparam int unsigned PW = CH * B;
  localparam int unsigned CW = $clog2(DIM);
  localparam int unsigned SW = (K < 2) ? 1 : $clog2(K);

  logic [PW-1:0] lbuf [K][DIM];
  logic [CW-1:0] row, col;
  logic [SW-1:0] slot;               // line-buffer slot of the current row

  logic in_fire, completes;
  logic [K*K*CH*B-1:0] window;

  assign in_ready  = !out_valid || out_ready;
  assign in_fire   = in_valid && in_ready;
  assign completes = (row >= CW'(K - 1)) && (col >= CW'(K - 1));

  // Assemble the window ending at (row, col) from the buffer and the input
  always_comb begin
    window = '0;
    for (int unsigned dr = 0; dr < K; dr++) begin
      for (int unsigned dc = 0; dc < K; dc++) begin
        logic [PW-1:0] px;
        int unsigned   s;
        int unsigned   cc;
        s  = (int'(slot) + 1 + dr) % K;
        cc = int'(col) - (K - 1) + dc;
        if (dr == K - 1 && dc == K - 1) px = in_data;
        else px = lbuf[s][cc % DIM];
        window[(dr*K + dc)*PW +: PW] = px;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_fire) lbuf[slot][col] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      col       <= '0;
      slot      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_fire) begin
        if (completes) begin
          out_valid <= 1'b1;
          out_data  <= window;
        end
        if (col == CW'(DIM - 1)) begin
          col <= '0;
          if (row == CW'(DIM - 1)) begin
            row  <= '0;
            slot <= '0;
          end else begin
            row  <= row + 1'b1;
            slot <= (slot == SW'(K - 1)) ? '0 : slot + 1'b1;
          end
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
