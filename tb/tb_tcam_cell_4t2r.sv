// Testbench of tcam_cell_4t2r: every stored value against every data-line
// pair, with and without the source-line pulse. Expected NX values are the
// rows of the cell's search table (mismatch = NX high), written out here.
module tb_tcam_cell_4t2r;
  import tcam_pkg::*;

  logic clk = 0;
  logic we;
  ternary_t wdata, data;
  dl_t dl;
  logic dsl_en, nx;
  int checks = 0, failures = 0;

  tcam_cell_4t2r dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Search table: row = {value, DL, DLB} -> NX high (mismatch).
  function automatic logic table_nx(ternary_t v, logic d, logic db);
    case ({d, db})
      2'b10: return v == T0;            // search 1
      2'b01: return v == T1;            // search 0
      2'b00: return 1'b0;               // masked input
      default: return v != TX;          // DL=DLB=1: care cells
    endcase
  endfunction

  ternary_t vals[3] = '{T0, T1, TX};

  initial begin
    we = 0; wdata = TX; dl = '0; dsl_en = 0;
    foreach (vals[i]) begin
      @(negedge clk); we = 1; wdata = vals[i];
      @(negedge clk); we = 0; wdata = (vals[i] == T0) ? T1 : T0;
      checks++;
      if (data != vals[i]) begin failures++; $display("store %s read %s", vals[i].name(), data.name()); end
      for (int p = 0; p < 8; p++) begin
        dl.dl = p[1]; dl.dlb = p[0]; dsl_en = p[2];
        #1;
        checks++;
        if (nx !== (dsl_en & table_nx(vals[i], dl.dl, dl.dlb))) begin
          failures++;
          $display("cell %s DL=%b DLB=%b DSL=%b: nx=%b", vals[i].name(), dl.dl, dl.dlb, dsl_en, nx);
        end
      end
      // we low: value must not change
      @(negedge clk);
      checks++;
      if (data != vals[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
