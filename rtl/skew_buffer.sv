// skew_buffer: per-column delay lines between row-parallel streams and the
// diagonal wavefront of a systolic array.
//
// Column j of the input is delayed by j cycles (REVERSE = 0, skewing a row
// into the array's wavefront) or by W-1-j cycles (REVERSE = 1, deskewing
// the array's bottom output back into whole rows). Each column carries a
// data word and one side bit (used for the C4 clear bit, which must travel
// with the data). Column 0 (or W-1 when deskewing) is a plain wire.
//
// The source design shows both streams skewed at the array edges; producing
// and removing the skew in hardware next to the array is this design's
// choice, so that the user sees one matrix row per cycle.
module skew_buffer
  import faddeev_pkg::*;
#(
  parameter int unsigned W       = 32,
  parameter bit          REVERSE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  fx_t  d_in  [W],
  input  logic b_in  [W],
  output fx_t  d_out [W],
  output logic b_out [W]
);

  for (genvar j = 0; j < W; j++) begin : g_col
    localparam int unsigned DLY = REVERSE ? (W - 1 - j) : j;
    if (DLY == 0) begin : g_wire
      assign d_out[j] = d_in[j];
      assign b_out[j] = b_in[j];
    end else begin : g_dly
      fx_t  dq [DLY];
      logic bq [DLY];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < DLY; k++) begin
            dq[k] <= FX_ZERO;
            bq[k] <= 1'b0;
          end
        end else begin
          dq[0] <= d_in[j];
          bq[0] <= b_in[j];
          for (int k = 1; k < DLY; k++) begin
            dq[k] <= dq[k-1];
            bq[k] <= bq[k-1];
          end
        end
      end
      assign d_out[j] = dq[DLY-1];
      assign b_out[j] = bq[DLY-1];
    end
  end

endmodule
