// fastmul: unsigned array multiplier, AW x BW -> AW+BW bits.
//
// The classic array multiplier: every partial-product bit a[j] & b[i] is an
// AND gate, and rows of full adders reduce them one multiplier bit at a time.
// Row i adds partial product row i to the sums of row i-1 (shifted by one
// place) and to the carries of row i-1 (carry-save, so no carry ripples inside
// a row). Each row retires its lowest sum bit as a product bit. A final
// ripple-carry row merges the last row's sums and carries into the upper
// AW product bits.
//
// The filters use it to multiply a 4-bit sample by a 4-bit coefficient.
// Purely combinational. The array organisation follows the filter
// description, which calls for an array multiplier; its exact arrangement
// (carry-save rows, ripple final row) is this design's choice.
module fastmul #(
  parameter int unsigned AW = fir_pkg::DATA_W,
  parameter int unsigned BW = fir_pkg::COEF_W
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);
  // s[i][j], c[i][j]: sum and carry of the full adder in row i, column j.
  // s[i][j] has weight i+j, c[i][j] weight i+j+1.
  logic [BW-1:0][AW-1:0] s;
  logic [BW-1:0][AW-1:0] c;
  logic [AW:0]           rc;   // carries of the final ripple row

  always_comb begin
    s = '0;
    c = '0;
    rc = '0;
    p = '0;
    // Row 0: the first partial-product row passes straight through.
    for (int j = 0; j < AW; j++) begin
      s[0][j] = a[j] & b[0];
    end
    p[0] = s[0][0];
    // Rows 1..BW-1: carry-save full-adder rows.
    for (int i = 1; i < BW; i++) begin
      for (int j = 0; j < AW; j++) begin
        logic x, y, z;
        x = a[j] & b[i];
        y = (j + 1 < AW) ? s[i-1][j+1] : 1'b0;
        z = c[i-1][j];
        s[i][j] = x ^ y ^ z;
        c[i][j] = (x & y) | (x & z) | (y & z);
      end
      p[i] = s[i][0];
    end
    // Final row: ripple-carry merge of the remaining sums and carries.
    for (int j = 0; j < AW; j++) begin
      logic y;
      y = (j + 1 < AW) ? s[BW-1][j+1] : 1'b0;
      p[BW+j] = y ^ c[BW-1][j] ^ rc[j];
      rc[j+1] = (y & c[BW-1][j]) | (y & rc[j]) | (c[BW-1][j] & rc[j]);
    end
  end
endmodule
