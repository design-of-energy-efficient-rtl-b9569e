// Testbench of dl_driver: data-line pairs for random keys and masks in each
// mode, checked against the search table's encodings.
module tb_dl_driver;
  import tcam_pkg::*;
  localparam int W = 8;
  dl_mode_t mode;
  logic [W-1:0] key, mask;
  dl_t [W-1:0] dl;
  int checks = 0, failures = 0;

  dl_driver #(.W(W)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dl_t e;
  initial begin
    for (int n = 0; n < 60; n++) begin
      key = W'($urandom); mask = W'($urandom);
      mode = dl_mode_t'(n % 3);
      #1;
      for (int i = 0; i < W; i++) begin
        if (mode == DL_LENGTH)      e = '{1'b1, 1'b1};
        else if (mode == DL_STANDBY) e = '{1'b0, 1'b0};
        else if (mask[i])           e = '{1'b0, 1'b0};
        else if (key[i])            e = '{1'b1, 1'b0};
        else                        e = '{1'b0, 1'b1};
        checks++;
        if (dl[i] !== e) begin failures++; $display("mode %s bit %0d key %b mask %b dl %b", mode.name(), i, key[i], mask[i], dl[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
