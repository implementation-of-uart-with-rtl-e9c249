// Reference helpers shared by the UART testbenches, written independently of the RTL:
// the serial frame expected for a byte in a given line format (start bit, data LSB
// first, optional parity, one or two stop bits) and the format's parity rule.
package uart_tb_pkg;

  // LCR byte fields: [7] two stop bits, [6:5] word length - 5, [4] parity on, [3] even.
  function automatic int ref_data_bits(logic [7:0] lcr_byte);
    return 5 + int'(lcr_byte[6:5]);
  endfunction

  function automatic logic ref_parity(logic [7:0] d, logic [7:0] lcr_byte);
    int ones = 0;
    for (int i = 0; i < ref_data_bits(lcr_byte); i++) ones += int'(d[i]);
    return lcr_byte[3] ? logic'(ones % 2) : logic'((ones + 1) % 2);
  endfunction

  // Returns the number of bits; f[0] is the first bit on the line.
  function automatic int ref_frame(logic [7:0] d, logic [7:0] lcr_byte, output logic [11:0] f);
    int n = 0;
    f = '1;
    f[n++] = 1'b0;
    for (int i = 0; i < ref_data_bits(lcr_byte); i++) f[n++] = d[i];
    if (lcr_byte[4]) f[n++] = ref_parity(d, lcr_byte);
    f[n++] = 1'b1;
    if (lcr_byte[7]) f[n++] = 1'b1;
    return n;
  endfunction

  function automatic logic [7:0] ref_mask(logic [7:0] d, logic [7:0] lcr_byte);
    return d & 8'(8'hFF >> (8 - ref_data_bits(lcr_byte)));
  endfunction

endpackage
