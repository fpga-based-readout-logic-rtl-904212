// alfa_tb_pkg: reference model of the Alfa-M output data block, shared by
// the testbenches.  The block is built word by word from the event's TTC
// values, the error bits and the PMF data, independently of the RTL.
package alfa_tb_pkg;
  typedef logic [63:0] data_arr_t[];

  function automatic void expected_block(output logic [31:0] blk[$],
                                         input logic [11:0] bcid,
                                         input logic [23:0] evcnt,
                                         input logic [24:0] pmferr,
                                         input data_arr_t   data);
    logic [31:0] par;
    blk = {};
    blk.push_back(32'hB0F00000);
    blk.push_back({20'b0, bcid});
    blk.push_back({8'b0, evcnt});
    blk.push_back({7'b0, pmferr});
    blk.push_back(32'(data.size()));
    foreach (data[k]) begin
      blk.push_back(data[k][31:0]);
      blk.push_back(data[k][63:32]);
    end
    par = '0;
    for (int k = 1; k < blk.size(); k++) par ^= blk[k];
    blk.push_back(par);
    blk.push_back(32'hE0F00000);
  endfunction

  // deterministic front-end pattern for PMF i in bunch crossing t
  function automatic logic [63:0] fe_pattern(input int i, input int unsigned t);
    logic [31:0] a, b;
    a = 32'(t) * 32'h9E3779B1 ^ 32'(i) * 32'h85EBCA77;
    b = (a ^ (a >> 15)) * 32'hC2B2AE3D + 32'(i);
    return {a ^ {b[15:0], b[31:16]}, b};
  endfunction
endpackage
