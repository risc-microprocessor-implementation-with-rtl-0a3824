// tb_mem_data_io: self-checking test of mem_data_io. For every access size
// and byte offset: byte enables and lane placement of store data, and the
// extracted, sign- or zero-extended load value, all for big-endian byte
// order (offset 0 = bits 31:24).
module tb_mem_data_io;
  import dlx_pkg::*;
  mem_size_e   size;
  logic [1:0]  lo;
  logic        uns;
  logic [31:0] sd, wdata, rdata, ld;
  logic [3:0]  be;
  int checks = 0, failures = 0;

  mem_data_io u_dut (.size, .addr_lo(lo), .load_unsigned(uns), .store_data(sd),
                     .pad_wdata(wdata), .pad_be(be), .pad_rdata(rdata), .load_data(ld));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++)
      for (int s = 0; s < 3; s++)
        for (int o = 0; o < 4; o++) begin
          logic [31:0] eld; logic [3:0] ebe; logic [7:0] bv; logic [15:0] hv;
          size = mem_size_e'(s); lo = 2'(o); uns = 1'($urandom); sd = $urandom; rdata = $urandom;
          #1;
          bv = rdata >> (8 * (3 - o));
          hv = (o >= 2) ? rdata[15:0] : rdata[31:16];
          case (s)
            0: begin ebe = 4'b1000 >> o; eld = uns ? {24'b0, bv} : {{24{bv[7]}}, bv}; end
            1: begin ebe = (o >= 2) ? 4'b0011 : 4'b1100; eld = uns ? {16'b0, hv} : {{16{hv[15]}}, hv}; end
            default: begin ebe = 4'b1111; eld = rdata; end
          endcase
          check(be == ebe, $sformatf("be size %0d off %0d = %b", s, o, be));
          check(ld == eld, $sformatf("load size %0d off %0d uns %0d: %h exp %h", s, o, uns, ld, eld));
          for (int i = 0; i < 4; i++)
            if (ebe[i]) begin
              logic [7:0] want;
              want = (s == 0) ? sd[7:0] : (s == 1) ? (i % 2 ? sd[15:8] : sd[7:0]) : sd[8*i +: 8];
              check(wdata[8*i +: 8] == want, $sformatf("store lane %0d size %0d", i, s));
            end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
