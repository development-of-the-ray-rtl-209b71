// rf_hist_adder - adder cascade of the ray finder board.
//
// Each of the 8 ray gate arrays reports how many of its 31 rays are true as a
// 5-bit number (H1..H5).  The board adds them with MSI 4-bit adders into the
// 8-bit height of its histogram bin (at most 8 x 31 = 248), which is sent to
// the adders over all phi segments.  The cascade is combinational; its input
// is already registered inside the gate arrays.
//
// Interface: h[N][5]; sum[7:0].  Written as one sum, which synthesis turns
// into an adder tree; the exact wiring of the eleven 74F283 adder chips of the
// board is not reproduced.
module rf_hist_adder #(
  parameter int unsigned N = 8
) (
  input  logic [4:0] h [N],
  output logic [7:0] sum
);
  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum = sum + 8'(h[i]);
  end
endmodule
