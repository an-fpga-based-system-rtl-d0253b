// susan_usan: the common core of the SUSAN detectors (purely
// combinational). For a 7 x 7 window it takes the 37 pixels of the
// approximately circular SUSAN mask (rows of 3, 5, 7, 7, 7, 5, 3 pixels)
// and marks each as similar to the nucleus (centre) when their brightness
// differs by at most T. It returns the USAN area n, the number of similar
// pixels including the nucleus (1..37), and the sums sx, sy of the column
// and row offsets of the similar pixels, from which the USAN centroid
// (sx/n, sy/n) follows. The mask and the hard similarity threshold are those
// of the published SUSAN method; the document only names the detector.
module susan_usan #(
  parameter int unsigned T = 20
) (
  input  logic [7*7*8-1:0]  win,
  output logic [5:0]        n,
  output logic signed [6:0] sx,
  output logic signed [6:0] sy
);
  // half-width of the mask in each row
  function automatic int half(input int r);
    case (r)
      0, 6:    return 1;
      1, 5:    return 2;
      default: return 3;
    endcase
  endfunction

  always_comb begin
    logic [7:0] c0, p;
    logic [8:0] d;
    c0 = win[(3*7 + 3)*8 +: 8];
    n  = '0;
    sx = '0;
    sy = '0;
    for (int r = 0; r < 7; r++) begin
      for (int c = 0; c < 7; c++) begin
        p = win[(r*7 + c)*8 +: 8];
        d = (p > c0) ? 9'(p - c0) : 9'(c0 - p);
        if ((c - 3 <= half(r)) && (3 - c <= half(r)) && d <= 9'(T)) begin
          n  = n + 6'd1;
          sx = sx + 7'(c - 3);
          sy = sy + 7'(r - 3);
        end
      end
    end
  end

endmodule
