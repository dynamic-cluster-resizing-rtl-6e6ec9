// tb_ed2p_unit: ED2P arithmetic and latency.
//
// Random energy, cycle and instruction counts (and the corner cases I = 0,
// Iref = I, a scaled delay that saturates) are applied; both products are
// compared with 128-bit arithmetic in the testbench, and the start-to-done
// latency must be INS_W + CYC_W + 5 cycles.
module tb_ed2p_unit;
  localparam int E_W = 32, CYC_W = 19, INS_W = 22, D_W = 23;
  localparam int P_W = E_W + 2 * D_W;
  localparam int LAT = INS_W + CYC_W + 5;

  logic clk = 0, rst_n = 0, start = 0;
  logic [E_W-1:0] energy;
  logic [CYC_W-1:0] cycles;
  logic [INS_W-1:0] instrs, ref_instrs;
  logic busy, done;
  logic [P_W-1:0] ed2p_raw, ed2p_scaled;
  int checks = 0, failures = 0;

  ed2p_unit #(.E_W(E_W), .CYC_W(CYC_W), .INS_W(INS_W), .D_W(D_W)) dut (
    .clk, .rst_n, .start, .energy, .cycles, .instrs, .ref_instrs, .busy, .done, .ed2p_raw, .ed2p_scaled);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one(logic [E_W-1:0] e, logic [CYC_W-1:0] c, logic [INS_W-1:0] i, logic [INS_W-1:0] r);
    logic [127:0] d, er, es;
    int lat;
    d = (i == 0) ? 128'(2**D_W - 1) : (128'(r) * 128'(c)) / 128'(i);
    if (d > 128'(2**D_W - 1)) d = 128'(2**D_W - 1);
    er = 128'(e) * 128'(c) * 128'(c);
    es = 128'(e) * d * d;
    @(negedge clk);
    energy = e; cycles = c; instrs = i; ref_instrs = r; start = 1;
    @(negedge clk);
    start = 0;
    energy = '1; cycles = '1; instrs = '1; ref_instrs = '1;  // inputs are latched
    lat = 1;
    while (!done && lat < 200) begin @(negedge clk); lat++; end
    check(lat == LAT, $sformatf("latency %0d exp %0d", lat, LAT));
    check(128'(ed2p_raw) == er, $sformatf("raw %0d exp %0d", ed2p_raw, er));
    check(128'(ed2p_scaled) == es, $sformatf("scaled %0d exp %0d (e=%0d c=%0d i=%0d r=%0d)", ed2p_scaled, es, e, c, i, r));
  endtask

  initial begin
    energy = 0; cycles = 0; instrs = 0; ref_instrs = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    one(32'd1000, 19'd16384, 22'd20000, 22'd20000);
    one(32'd5, 19'd100, 22'd0, 22'd50);                // no instructions: saturate
    one(32'hFFFF_FFFF, 19'h7FFFF, 22'd1, 22'h3FFFFF);  // huge scaled delay: saturate
    one(32'd77, 19'd16384, 22'd30000, 22'd15000);
    for (int k = 0; k < 40; k++)
      one($urandom, CYC_W'($urandom), INS_W'($urandom % 70000 + 1), INS_W'($urandom % 70000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
