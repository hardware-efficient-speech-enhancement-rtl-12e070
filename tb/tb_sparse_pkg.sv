// tb_sparse_pkg: testbench helpers for the compressed sparse column weight
// format of the DNN processing elements. encode_column turns the sorted list
// of local rows holding a non-zero weight (and each weight's sign) into
// 5-bit entries {sign, rel}: rel = distance from the previous non-zero row
// (from row -1 for the first), with zero-padding entries (rel = 0, +15 rows)
// inserted wherever the distance exceeds 15.
package tb_sparse_pkg;
  function automatic void encode_column(input int rows[$], input bit neg[$], ref bit [4:0] ents[$]);
    int prev;
    prev = -1;
    foreach (rows[i]) begin
      int gap;
      gap = rows[i] - prev;
      while (gap > 15) begin
        ents.push_back(5'b0_0000);
        gap -= 15;
      end
      ents.push_back({neg[i], 4'(gap)});
      prev = rows[i];
    end
  endfunction
endpackage
