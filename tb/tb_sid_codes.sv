// Runs the decoder on the codes of the synthesis table whose generator
// matrices can be built: the (7,4,3) Hamming code (QR code of length 7), the
// (15,7,5) BCH code (g(x) = x^8 + x^7 + x^6 + x^4 + 1), the extended Golay
// (24,12,8) code and the extended QR (48,24,12) code. Each harness checks
// every word against the reference model and drives worst-case words; this
// testbench checks that the worst-case latency equals 2n - dmin + k + 4, the
// table's latency column (19, 36, 56 and 112 cycles).
module tb_sid_codes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NC = 4;
  logic done [NC];
  int ck [NC], fl [NC], lmin [NC], lmax [NC], wg [NC];
  int checks = 0, failures = 0;
  localparam int LAT [NC] = '{19, 36, 56, 112};

  sid_code_harness #(.N(7), .K(4), .DMIN(3),
    .G(sid_pkg::cyclic_generator(sid_pkg::qr_poly(7), 7, 1'b0)), .NW(400)) h7 (
    .clk, .rst_n, .done(done[0]), .checks(ck[0]), .failures(fl[0]), .lat_min(lmin[0]), .lat_max(lmax[0]), .worst_g(wg[0]));
  sid_code_harness #(.N(15), .K(7), .DMIN(5),
    .G(sid_pkg::cyclic_generator(81'h1d1, 15, 1'b0)), .NW(400)) h15 (
    .clk, .rst_n, .done(done[1]), .checks(ck[1]), .failures(fl[1]), .lat_min(lmin[1]), .lat_max(lmax[1]), .worst_g(wg[1]));
  sid_code_harness #(.N(24), .K(12), .DMIN(8),
    .G(sid_pkg::qr_generator(23)), .NW(400)) h24 (
    .clk, .rst_n, .done(done[2]), .checks(ck[2]), .failures(fl[2]), .lat_min(lmin[2]), .lat_max(lmax[2]), .worst_g(wg[2]));
  sid_code_harness #(.N(48), .K(24), .DMIN(12),
    .G(sid_pkg::qr_generator(47)), .NW(300)) h48 (
    .clk, .rst_n, .done(done[3]), .checks(ck[3]), .failures(fl[3]), .lat_min(lmin[3]), .lat_max(lmax[3]), .worst_g(wg[3]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < NC; i++) begin
      checks += ck[i] + 1;
      failures += fl[i];
      if (lmax[i] != LAT[i]) begin
        failures++;
        $display("FAIL code %0d worst latency %0d, expected %0d", i, lmax[i], LAT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 200000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
