// nvram_chip_model: behavioural model of one x16 asynchronous parallel nvRAM
// (STT-MRAM or FRAM type) for simulation only. Not synthesizable.
//
// Reads: while chip enable and output enable are low the model drives the
// word at mem_addr, but only once ACCESS_NS have passed since the access
// began (chip enable, output enable or address change); before that it
// drives the value 16'h0BAD so that a controller that samples
// too early reads wrong data. Writes: the word is written, under the byte
// strobes, when write enable rises while the chip is selected; a write pulse
// shorter than WP_NS is counted in short_pulses and ignored.
module nvram_chip_model #(
  parameter int unsigned ADDR_W    = 18,
  parameter int unsigned ACCESS_NS = 60,
  parameter int unsigned WP_NS     = 40
) (
  input  logic              ce_n,
  input  logic              oe_n,
  input  logic              we_n,
  input  logic              ub_n,
  input  logic              lb_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       dq_i,     // data driven by the controller
  output logic [15:0]       dq_o,     // data driven by this chip
  output logic              dq_oe     // chip drives the bus
);

  logic [15:0] mem [2**ADDR_W];
  realtime t_start, t_we_fall;
  logic ce_at_we, ub_at_we, lb_at_we;   // strobes seen when the write began
  int unsigned short_pulses = 0;

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = 16'h0;
    t_start   = 0;
    t_we_fall = 0;
    ce_at_we  = 1'b0;
    ub_at_we  = 1'b0;
    lb_at_we  = 1'b0;
  end

  always @(negedge ce_n or negedge oe_n or addr) t_start = $realtime;
  always @(negedge we_n) begin
    t_we_fall = $realtime;
    ce_at_we  = !ce_n;
    ub_at_we  = !ub_n;
    lb_at_we  = !lb_n;
  end

  always @(posedge we_n) begin
    if (ce_at_we) begin
      if (($realtime - t_we_fall) < WP_NS * 1ns) short_pulses++;
      else begin
        if (lb_at_we) mem[addr][7:0]  = dq_i[7:0];
        if (ub_at_we) mem[addr][15:8] = dq_i[15:8];
      end
    end
  end

  logic reading;
  logic settled;
  assign reading = !ce_n && !oe_n && we_n;
  assign dq_oe   = reading;

  always @* begin
    settled = ($realtime - t_start) >= ACCESS_NS * 1ns;
    dq_o = (reading && settled) ? mem[addr] : 16'h0BAD;
  end

  // re-evaluate once the access time has passed
  always @(t_start) begin
    #(ACCESS_NS * 1ns);
    settled = ($realtime - t_start) >= ACCESS_NS * 1ns;
    dq_o = (reading && settled) ? mem[addr] : 16'h0BAD;
  end

endmodule
