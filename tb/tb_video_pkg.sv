// tb_video_pkg: reference functions shared by the testbenches.
//   pix        the byte the decoder stream model sends at (field, line, pixel clock)
//   seg_on     the segments a hex digit lights, from a per-digit segment list written
//              independently of the design's table
package tb_video_pkg;

  function automatic logic [7:0] pix(input int unsigned field, input int unsigned line,
                                     input int unsigned h);
    return 8'((line * 13) ^ (h * 5) ^ (field * 77) ^ (h >> 3));
  endfunction

  // Segments lit per digit, letters a..g (a = top, b..f clockwise, g = middle).
  function automatic logic [6:0] seg_on(input logic [3:0] d);
    string s;
    logic [6:0] r;
    case (d)
      4'h0: s = "abcdef";   4'h1: s = "bc";      4'h2: s = "abdeg";   4'h3: s = "abcdg";
      4'h4: s = "bcfg";     4'h5: s = "acdfg";   4'h6: s = "acdefg";  4'h7: s = "abc";
      4'h8: s = "abcdefg";  4'h9: s = "abcdfg";  4'hA: s = "abcefg";  4'hB: s = "cdefg";
      4'hC: s = "adef";     4'hD: s = "bcdeg";   4'hE: s = "adefg";   default: s = "aefg";
    endcase
    r = '0;
    for (int i = 0; i < s.len(); i++) r[3'(s[i] - 8'h61)] = 1'b1;
    return r;
  endfunction

endpackage
