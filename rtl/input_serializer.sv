// input_serializer: feeds a batch of N parallel input bytes into the first
// column as a stream in which every byte is repeated C times (copy ratio), so
// slot s of the stream carries byte s/C. A batch offered with in_valid is
// taken in the last cycle of a period (in_ready high) and streamed during
// phases 0 .. L-1 of the next one; with no batch offered the stream carries
// zeros and batch_valid_o stays low. Repetition and sequential feeding are
// the document's; the valid/ready handshake is this design's. in_ready is simply
// period_end passed through: the serializer can take a batch in that cycle
// and in no other, whatever its state.
module input_serializer
  import solar_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned C = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  phase_t      phase,
  input  logic        period_end,
  input  data_t [N-1:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  output data_t       stream_o,
  output logic        batch_valid_o   // the batch now being streamed is real
);

  localparam int unsigned L = N * C;

  data_t [N-1:0] buf_q;
  localparam int unsigned IW = $clog2(N+1);
  localparam int unsigned CW = $clog2(C+1);

  logic [IW-1:0] item_q;
  logic [CW-1:0] copy_q;

  assign in_ready = period_end;

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_q         <= '0;
      batch_valid_o <= 1'b0;
      item_q        <= '0;
      copy_q        <= '0;
    end else begin
      if (period_end) begin
        buf_q         <= in_valid ? in_data : '0;
        batch_valid_o <= in_valid;
        item_q        <= '0;
        copy_q        <= '0;
      end else if (phase < phase_t'(L)) begin
        if (copy_q == CW'(C - 1)) begin
          copy_q <= '0;
          item_q <= item_q + 1'b1;
        end else begin
          copy_q <= copy_q + 1'b1;
        end
      end
    end
  end

  assign stream_o = (phase < phase_t'(L) && item_q < IW'(N)) ? buf_q[item_q] : '0;

endmodule
