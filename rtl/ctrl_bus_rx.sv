// ctrl_bus_rx: receiver of the slow control link from the PC.
//
// The PC software drives I/O lines of the USB module directly to form an
// 8-bit parallel bus that carries a register address (8 bits) followed by
// its data (16 bits). A write is three bytes: the address with ctl_start
// high, then the data high byte and the data low byte. The software puts a
// byte on ctl_d and then raises ctl_stb; ctl_stb and ctl_start pass
// through two-flip-flop synchronisers and the byte is taken on the
// synchronised rising edge of ctl_stb, when ctl_d has long been stable
// (it passes through the same synchroniser stages). After the third byte
// wr pulses for one clock with addr and data. A byte with ctl_start high
// always begins a new write, so a lost byte costs one write at most.
// The byte order, the start line and the strobe rule are this design's
// own; the bus and its widths follow the published description.
// Timing: wr rises two to three clocks after the rising edge of the third
// strobe (synchroniser and edge detector).
module ctrl_bus_rx (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  ctl_d,
  input  logic        ctl_stb,
  input  logic        ctl_start,
  output logic        wr,
  output logic [7:0]  addr,
  output logic [15:0] data
);
  logic [9:0] s1, s2;        // {stb, start, d}
  logic       stb_q;
  logic [1:0] nbytes;        // data bytes expected after the address

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0; stb_q <= 1'b0;
      nbytes <= '0; wr <= 1'b0; addr <= '0; data <= '0;
    end else begin
      s1    <= {ctl_stb, ctl_start, ctl_d};
      s2    <= s1;
      stb_q <= s2[9];
      wr    <= 1'b0;
      if (s2[9] && !stb_q) begin
        if (s2[8]) begin
          addr   <= s2[7:0];
          nbytes <= 2'd2;
        end else if (nbytes == 2'd2) begin
          data[15:8] <= s2[7:0];
          nbytes     <= 2'd1;
        end else if (nbytes == 2'd1) begin
          data[7:0] <= s2[7:0];
          nbytes    <= 2'd0;
          wr        <= 1'b1;
        end
      end
    end
  end
endmodule
