// phy_reg_model: behavioural stand-in for the PHY register controller.
//
// A parallel-interface slave with a sparse register space (unwritten
// registers read as 0). It acknowledges each request LAT cycles after it was
// first seen (LAT=1 gives the two-cycle transfer of the real controller) and
// records every write, in order, in wr_addr/wr_data so a testbench can
// compare what reached the PHY with what it expected.
module phy_reg_model
  import seq_pkg::*;
#(
  parameter int LAT = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  par_req_t req,
  output par_rsp_t rsp
);
  data_t regs [addr_t];
  addr_t wr_addr [$];
  data_t wr_data [$];
  int    wait_cnt;
  int    n_reads = 0;
  int    lat = LAT;   // may be changed by a testbench between transfers

  always @(posedge clk) begin
    if (!rst_n) begin
      rsp      <= '0;
      wait_cnt <= 0;
    end else if (rsp.ack) begin
      rsp.ack  <= 1'b0;
      wait_cnt <= 0;
    end else if (req.req) begin
      if (wait_cnt + 1 >= lat) begin
        rsp.ack <= 1'b1;
        if (req.we) begin
          regs[req.addr] = req.wdata;
          wr_addr.push_back(req.addr);
          wr_data.push_back(req.wdata);
          rsp.rdata <= '0;
        end else begin
          rsp.rdata <= regs.exists(req.addr) ? regs[req.addr] : '0;
          n_reads++;
        end
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end
  end

  function automatic void clear_log();
    wr_addr.delete();
    wr_data.delete();
  endfunction
endmodule
