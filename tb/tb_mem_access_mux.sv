// tb_mem_access_mux: self-checking test of the SRAM pin multiplexer.
//
// Random requests are applied on both sides with every combination of
// global enable and host selection. Expected pins: the selected side's
// address, data and strobes (inverted to active-low levels); with enable
// off and no host selection the pad drivers are off and every strobe is
// inactive; the data bus is returned unchanged.
module tb_mem_access_mux
  import tdas_pkg::*;
;
  logic      enable, host_sel;
  sram_req_t hist_req, host_req, exp_req;
  mem_addr_t addr;
  mem_data_t dq_o, dq_i, rdata;
  logic      dq_oe, ce_n, oe_n, we_n, pins_oe;
  int checks = 0, failures = 0;

  mem_access_mux dut (
    .enable_i(enable), .host_sel_i(host_sel), .hist_req_i(hist_req),
    .host_req_i(host_req), .sram_addr_o(addr), .sram_dq_o(dq_o),
    .sram_dq_oe_o(dq_oe), .sram_dq_i(dq_i), .sram_ce_n_o(ce_n),
    .sram_oe_n_o(oe_n), .sram_we_n_o(we_n), .pins_oe_o(pins_oe),
    .rdata_o(rdata)
  );

  function automatic sram_req_t rand_req();
    sram_req_t r;
    r.addr  = mem_addr_t'($urandom);
    r.wdata = mem_data_t'($urandom);
    r.ce    = 1'($urandom);
    r.oe    = 1'($urandom);
    r.we    = 1'($urandom);
    r.dq_oe = 1'($urandom);
    return r;
  endfunction

  initial begin
    #10ms;
    checks++; failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      enable   = 1'(i);
      host_sel = 1'(i >> 1);
      hist_req = rand_req();
      host_req = rand_req();
      dq_i     = mem_data_t'($urandom);
      #1ns;
      checks++;
      if (!enable && !host_sel) begin
        if (pins_oe || dq_oe || !ce_n || !oe_n || !we_n) begin
          failures++;
          $display("FAIL: pins driven or strobes active while disabled");
        end
      end else begin
        exp_req = host_sel ? host_req : hist_req;
        if (!pins_oe || addr != exp_req.addr || dq_o != exp_req.wdata ||
            dq_oe != exp_req.dq_oe || ce_n != !exp_req.ce ||
            oe_n != !exp_req.oe || we_n != !exp_req.we) begin
          failures++;
          $display("FAIL: en=%0b host=%0b wrong pins", enable, host_sel);
        end
      end
      checks++;
      if (rdata != dq_i) begin
        failures++;
        $display("FAIL: read data not passed back");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
