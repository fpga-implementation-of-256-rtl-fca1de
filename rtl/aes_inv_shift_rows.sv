// aes_inv_shift_rows: the InvShiftRows transformation of the inverse cipher.
//
// Row r of the 4x4 state is rotated r bytes to the right, undoing
// aes_shift_rows: output byte (r, c) takes input byte (r, (c-r) mod 4).
// Pure wiring, no logic and no clock.
module aes_inv_shift_rows (
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c+4-r)%4)+r) -: 8];
    end
  end

endmodule
