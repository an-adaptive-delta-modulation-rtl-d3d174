// tb_adm_demodulator: a random bit stream with runs and alternations is
// received with random gaps and with bit_valid low at first; the
// integrator output r and the step size are compared with the reference
// model after every clock, and the output y with a separately instantiated
// band-pass filter fed with the model's estimate.
module tb_adm_demodulator;
  import adm_tb_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0, bit_in = 0, bit_valid = 0;
  logic signed [11:0] r, y, delta, k_delta, y_ref;
  logic signed [11:0] r_model = 0;
  logic take_ref;
  logic [4:0] c;
  logic word_load;
  int checks = 0, failures = 0;
  adm_ref m;

  adm_demodulator #(.DATA_W(12), .DELTA0(32), .DELTA_MIN(32), .DELTA_MAX(256)) dut (
    .clk, .rst, .sample_en, .bit_in, .bit_valid, .r, .y, .delta, .c, .k_delta, .word_load);

  butterworth_bandpass ref_bpf (.clk, .rst, .sample_en(take_ref), .x(r_model), .y(y_ref));

  always #5 clk = ~clk;

  assign take_ref = sample_en && bit_valid;

  initial begin
    bit prev = 0;
    m = new(32, 256, 12);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 5000; i++) begin
      sample_en = 1'($urandom);
      bit_valid = (i > 20);
      bit_in = ((i / 250) % 2 == 0) ? (($urandom_range(0, 9) < 8) ? prev : !prev) : 1'($urandom);
      @(posedge clk);
      if (sample_en && bit_valid) begin m.step(bit_in); prev = bit_in; end
      #1;
      r_model = 12'(m.r);
      checks += 3;
      if (y != y_ref)             begin failures++; if (failures < 10) $display("FAIL y i=%0d", i); end
      if (int'(r) != m.r)         begin failures++; if (failures < 10) $display("FAIL r i=%0d", i); end
      if (int'(delta) != m.delta) begin failures++; if (failures < 10) $display("FAIL delta i=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
