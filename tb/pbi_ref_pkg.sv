// Reference model used by the testbenches of the bus-invert link.
//
// Written independently of the RTL: Hamming distances are counted bit by bit
// with plain loops, and the coding rules are spelled out directly.
//  - pbi_code: partitioned bus invert, one invert line per seg_w-bit segment;
//    a segment is inverted when more than half its bits would toggle.
//  - bi_code: classic single-invert-line bus invert over the whole word, the
//    invert line counted in the distance, used only to compare bus activity.
package pbi_ref_pkg;

  function automatic int hamming(logic [63:0] a, logic [63:0] b, int w);
    int n = 0;
    for (int i = 0; i < w; i++) if (a[i] != b[i]) n++;
    return n;
  endfunction

  // Partitioned bus invert: returns the coded word; inv gets the invert lines.
  function automatic logic [63:0] pbi_code(logic [63:0] data, logic [63:0] bus,
                                           int w, int seg_w, output logic [7:0] inv);
    logic [63:0] coded;
    coded = data;
    inv   = '0;
    for (int k = 0; k < w / seg_w; k++) begin
      int d = 0;
      for (int i = k * seg_w; i < (k + 1) * seg_w; i++) if (data[i] != bus[i]) d++;
      if (2 * d > seg_w) begin
        inv[k] = 1'b1;
        for (int i = k * seg_w; i < (k + 1) * seg_w; i++) coded[i] = !data[i];
      end
    end
    return coded;
  endfunction

  // Classic bus invert over w data lines plus one invert line.
  function automatic logic [63:0] bi_code(logic [63:0] data, logic [63:0] bus, logic bus_inv,
                                          int w, output logic inv);
    int d;
    d = hamming(data, bus, w) + (bus_inv ? 1 : 0);
    inv = (2 * d > w + 1);
    return inv ? ~data : data;
  endfunction

endpackage
