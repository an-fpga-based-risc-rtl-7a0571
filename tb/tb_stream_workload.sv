// tb_stream_workload: the streaming-store workload, run once with ordinary
// double-word stores (sd) and once with fast stores (sdf), on the whole
// design at its default sizes.
//
// The workload writes a 16 KB array (four times the cache) one double word at
// a time and then flushes the cache, so every line is written back once.
// With ordinary stores each write-back beat goes through the slow path and
// waits 5 extra cycles; with fast stores whole lines are written back
// through the fast path. The test counts the cycles of both runs, checks that
// every write-back took the expected path, that the fast run is faster, and
// that reading the array back afterwards returns what was stored. The
// measured speed-up is printed; it depends on how much other work the
// program does between stores, which this workload leaves out.
module tb_stream_workload;
  import rv_fs_pkg::*;
  import nvram_pkg::*;

  localparam int unsigned ARRAY_BYTES = 16384;
  localparam longint      BASE        = 64'h8000;

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;

  logic            instr_valid, instr_ready, instr_is_mem, misaligned;
  logic [31:0]     instr;
  logic [XLEN-1:0] rs1_val, rs2_val, ld_data;
  logic            ld_valid, st_done, flush_req, flush_done;
  logic [4:0]      ld_rd;
  logic [I_NUM-1:0] instr_vec;
  logic            ev_hit, ev_miss, ev_wb_fast, ev_wb_slow;
  logic [31:0]     slow_clk_ticks, fast_clk_ticks;
  logic      s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  axi_r_t    s_r;
  axi_resp_e s_bresp;
  logic [2:0]    mem_ce_n;
  logic          mem_oe_n, mem_we_n, mem_ub_n, mem_lb_n, mem_dq_oe;
  logic [17:0]   mem_addr;
  logic [15:0]   mem_dq_o;
  axi_state_e    nvram_state;

  nvm_mlc_top dut (
    .clk, .rst_n,
    .instr_valid, .instr_ready, .instr, .rs1_val, .rs2_val, .instr_is_mem,
    .misaligned, .ld_valid, .ld_data, .ld_rd, .st_done, .flush_req, .flush_done,
    .instr_vec, .ev_hit, .ev_miss, .ev_wb_fast, .ev_wb_slow, .slow_clk_ticks, .fast_clk_ticks,
    .s_awvalid(1'b0), .s_awready, .s_aw('0), .s_wvalid(1'b0), .s_wready, .s_w('0),
    .s_bvalid, .s_bready(1'b0), .s_bresp, .s_arvalid(1'b0), .s_arready, .s_ar('0),
    .s_rvalid, .s_rready(1'b0), .s_r,
    .mem_ce_n, .mem_oe_n, .mem_we_n, .mem_ub_n, .mem_lb_n,
    .mem_addr, .mem_dq_o, .mem_dq_oe, .mem_dq_i(16'h0), .nvram_state
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_wb_fast = 0, n_wb_slow = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && ev_wb_fast) n_wb_fast++;
    if (rst_n && ev_wb_slow) n_wb_slow++;
  end

  task automatic exec(input logic [31:0] ins, input logic [XLEN-1:0] r1,
                      input logic [XLEN-1:0] r2, output logic [XLEN-1:0] q);
    @(negedge clk);
    while (!instr_ready) @(negedge clk);
    instr = ins; rs1_val = r1; rs2_val = r2; instr_valid = 1'b1;
    @(negedge clk);
    instr_valid = 1'b0;
    while (!(ld_valid || st_done)) @(negedge clk);
    q = ld_data;
  endtask

  function automatic logic [XLEN-1:0] pattern(input int i, input int run);
    return {32'(run), 32'(i * 2654435761)};
  endfunction

  // One run: store the array with funct3 f3 (3 = sd, 7 = sdf), flush, time it.
  task automatic run(input int f3, input int id, output int cycles);
    logic [XLEN-1:0] q;
    int t0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    n_wb_fast = 0;
    n_wb_slow = 0;
    t0 = cyc;
    for (int i = 0; i < ARRAY_BYTES / 8; i++)
      exec({7'd0, 5'd2, 5'd1, 3'(f3), 5'd0, 7'b0100011}, XLEN'(BASE + 8 * i),
           pattern(i, id), q);
    @(negedge clk);
    flush_req = 1'b1;
    @(negedge clk);
    flush_req = 1'b0;
    while (!flush_done) @(negedge clk);
    cycles = cyc - t0;
    checks++;
    if (f3 == 7 ? (n_wb_fast != ARRAY_BYTES / 32 || n_wb_slow != 0)
                : (n_wb_slow != ARRAY_BYTES / 32 || n_wb_fast != 0)) begin
      failures++;
      $display("FAIL run %0d: %0d fast and %0d slow write-backs", id, n_wb_fast, n_wb_slow);
    end
    // read back (through the cache and, for evicted lines, the SRAM)
    for (int i = 0; i < ARRAY_BYTES / 8; i += 3) begin
      exec({12'd0, 5'd1, 3'd3, 5'd7, 7'b0000011}, XLEN'(BASE + 8 * i), '0, q);
      checks++;
      if (q !== pattern(i, id)) begin
        failures++; $display("FAIL run %0d word %0d: %h", id, i, q);
      end
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_slow, c_fast;
    instr_valid = 1'b0; instr = '0; rs1_val = '0; rs2_val = '0; flush_req = 1'b0;
    run(3, 1, c_slow);
    run(7, 2, c_fast);
    checks++;
    if (!(c_fast < c_slow)) begin failures++; $display("FAIL fast run not faster"); end
    $display("streaming %0d bytes: slow stores %0d cycles, fast stores %0d cycles, %0.1f%% fewer",
             ARRAY_BYTES, c_slow, c_fast, 100.0 * (c_slow - c_fast) / c_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
