// maxpool: streaming 2x2 max-pooling with stride 2.
//
// Input pixels (CH activations of B bits) arrive in row-major order over a
// DIM x DIM map; the output is the (DIM/2) x (DIM/2) map of per-channel
// maxima of each 2x2 block, also row-major. Activations are compared as
// unsigned integers, which is also correct for 1-bit bipolar activations
// (bit 1 = +1 > bit 0 = -1), where the maximum reduces to an OR.
//
// Even rows: the pair maximum of columns 2j and 2j+1 is stored in a row
// buffer of DIM/2 entries. Odd rows: the stored pair maximum is combined with
// the two new pixels and the block maximum is emitted when column 2j+1
// arrives. Valid/ready on both sides; a pixel is accepted while the output
// register is empty or being drained. DIM must be even. Pool size follows
// the CNV-6 network; the row-buffer scheme is this design's own.
module maxpool #(
  parameter int unsigned DIM = 28,
  parameter int unsigned CH  = 64,
  parameter int unsigned B   = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [CH*B-1:0]    in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [CH*B-1:0]    out_data
);
  localparam int unsigned CW = $clog2(DIM);
  localparam int unsigned HALF = DIM / 2;

  logic [CH*B-1:0] rbuf [HALF];
  logic [CH*B-1:0] hold;
  logic [CW-1:0]   row, col;
  logic            in_fire;

  function automatic logic [CH*B-1:0] vmax(logic [CH*B-1:0] a, logic [CH*B-1:0] b);
    logic [CH*B-1:0] r;
    for (int unsigned c = 0; c < CH; c++)
      r[c*B +: B] = (a[c*B +: B] > b[c*B +: B]) ? a[c*B +: B] : b[c*B +: B];
    return r;
  endfunction

  assign in_ready = !out_valid || out_ready;
  assign in_fire  = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (in_fire && !row[0] && col[0]) rbuf[col[CW-1:1]] <= vmax(hold, in_data);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      col       <= '0;
      hold      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_fire) begin
        if (!col[0]) hold <= row[0] ? vmax(rbuf[col[CW-1:1]], in_data) : in_data;
        if (row[0] && col[0]) begin
          out_valid <= 1'b1;
          out_data  <= vmax(hold, in_data);
        end
        if (col == CW'(DIM - 1)) begin
          col <= '0;
          row <= (row == CW'(DIM - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
